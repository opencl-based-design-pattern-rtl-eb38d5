// tb_table_update: sends control commands for all three tables to a ternary
// (LPM) update kernel and an exact one; checks that each takes only its own
// table's commands, builds the right mask from the prefix length and waits
// while the engine is not ready.
module tb_table_update;
  import router_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ctl_valid, ctl_ready_t, ctl_ready_e, wr_valid_t, wr_valid_e, wr_ready;
  ctl_cmd_t ctl;
  entry_wr_t wr_t, wr_e;
  int checks = 0, failures = 0, waited = 0;
  logic ctl_ready;   // readiness of the addressed kernel, as the router routes it
  assign ctl_ready = (ctl.table_id == ST_IPV4_LPM) ? ctl_ready_t :
                     (ctl.table_id == ST_FORWARD)  ? ctl_ready_e : 1'b1;
  entry_wr_t exp_t[$], exp_e[$];

  table_update #(.TABLE(ST_IPV4_LPM), .TERNARY(1'b1)) dut_t (
    .clk, .rst_n, .ctl_valid, .ctl_ready(ctl_ready_t), .ctl,
    .wr_valid(wr_valid_t), .wr_ready, .wr(wr_t));
  table_update #(.TABLE(ST_FORWARD), .TERNARY(1'b0)) dut_e (
    .clk, .rst_n, .ctl_valid, .ctl_ready(ctl_ready_e), .ctl,
    .wr_valid(wr_valid_e), .wr_ready, .wr(wr_e));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // reference mask: 8 padding bits plus prefix_len address bits, from the top
  function automatic logic [KEY_W-1:0] ref_mask(int pl);
    logic [KEY_W-1:0] m = '0;
    for (int i = 0; i < KEY_W; i++) if (i < 8 + pl) m[KEY_W-1-i] = 1'b1;
    return m;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (ctl_valid && ctl_ready) begin
      automatic entry_wr_t e = '{ctl.index, ctl.valid, ctl.key, '0, ctl.action};
      if (ctl.table_id == ST_IPV4_LPM) begin e.mask = ref_mask(ctl.prefix_len); exp_t.push_back(e); end
      if (ctl.table_id == ST_FORWARD)  begin e.mask = '1; exp_e.push_back(e); end
    end
    if (wr_valid_t && wr_ready) begin
      automatic entry_wr_t e = exp_t.pop_front();
      check(wr_t == e, $sformatf("LPM write mask %h exp %h", wr_t.mask, e.mask));
    end
    if (wr_valid_e && wr_ready) check(wr_e == exp_e.pop_front(), "exact write");
    if ((wr_valid_t || wr_valid_e) && !wr_ready) waited++;
  end

  initial begin
    ctl_valid = 0; ctl = '0; wr_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      wr_ready = ($urandom_range(0, 3) != 0);
      if (!ctl_valid || (ctl_ready)) begin
        ctl_valid = $urandom_range(0, 1);
        ctl.table_id = stage_e'($urandom_range(0, 2));
        ctl.index = 16'($urandom_range(0, 511));
        ctl.valid = $urandom_range(0, 1);
        ctl.key = {$urandom, 8'($urandom)};
        ctl.prefix_len = 6'($urandom_range(0, 32));
        ctl.action = {$urandom, 16'($urandom)};
      end
    end
    @(negedge clk); ctl_valid = 0; wr_ready = 1;
    repeat (4) @(posedge clk);
    check(exp_t.size() == 0 && exp_e.size() == 0, "every command written");
    check(waited > 0, "waited for the engine");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
