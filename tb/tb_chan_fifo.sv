// tb_chan_fifo: random two-lane pushes and pops against a queue model.
// The channel is 5 deep (not a power of two) to exercise pointer wrap.
module tb_chan_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0]  in_valid, out_valid, out_ready;
  logic [15:0] in_data [2];
  logic [15:0] out_data [2];
  logic        in_ready;
  logic [2:0]  count;
  int checks = 0, failures = 0;
  logic [15:0] model[$];
  int unsigned seq = 0;
  int full_seen = 0, dual_pop = 0;

  chan_fifo #(.T(logic [15:0]), .DEPTH(5), .PUSH_W(2), .POP_W(2)) dut (
    .clk, .rst_n, .in_valid, .in_data, .in_ready, .out_valid, .out_data, .out_ready, .count);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    in_valid = 0; out_ready = 0; in_data[0] = 0; in_data[1] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // model view of the outputs before this clock
      check(count == 3'(model.size()), $sformatf("count %0d model %0d iv %b or %b ir %b", count, model.size(), in_valid, out_ready, in_ready));
      for (int i = 0; i < 2; i++) begin
        check(out_valid[i] == (model.size() > i), "out_valid");
        if (model.size() > i) check(out_data[i] == model[i], $sformatf("data lane %0d", i));
      end
      check(in_ready == (model.size() <= 3), "in_ready");
      if (model.size() == 5) full_seen++;
      case ($urandom_range(0, 2))
        0: in_valid = 2'b00;
        1: in_valid = 2'b01;
        default: in_valid = 2'b11;
      endcase
      in_data[0] = 16'(seq); in_data[1] = 16'(seq + 1);
      out_ready = (cyc % 200 < 100) ? 2'(($urandom_range(0, 3) == 0) ? 2'b11 : 2'b00)
                                   : 2'(($urandom_range(0, 1)) ? 2'b11 : 2'b01);
      // apply this clock's pops then pushes to the model (sampled before the edge)
      #1;
      begin
        automatic int np = 0;
        for (int i = 0; i < 2; i++) if (out_valid[i] && out_ready[i] && np == i) np++;
        if (np == 2) dual_pop++;
        if (in_ready)
          for (int i = 0; i < 2; i++) if (in_valid[i]) begin model.push_back(in_data[i]); seq++; end
        repeat (np) void'(model.pop_front());
      end
      @(posedge clk);
    end
    check(full_seen > 0, "FIFO reached full");
    check(dual_pop > 0, "two items popped in one clock");
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
