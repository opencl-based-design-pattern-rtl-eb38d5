// tb_packet_server: random writes and reads against an associative-array model,
// checking the one-clock read latency and that the read data holds while b_re
// is low.
module tb_packet_server;
  import router_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_we, b_re;
  logic [SLOT_W-1:0] a_slot, b_slot;
  logic [WIDX_W-1:0] a_widx, b_widx;
  logic [WORD_W-1:0] a_data, b_data, exp_q, model [SLOTS][SLOT_WORDS];
  bit written [SLOTS][SLOT_WORDS];
  int checks = 0, failures = 0;

  packet_server dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [WORD_W-1:0] rnd();
    logic [WORD_W-1:0] v;
    for (int i = 0; i < WORD_W / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    a_we = 0; b_re = 0; a_slot = 0; a_widx = 0; a_data = 0; b_slot = 0; b_widx = 0;
    // fill every word once
    for (int s = 0; s < SLOTS; s++)
      for (int w = 0; w < SLOT_WORDS; w++) begin
        @(negedge clk);
        a_we = 1; a_slot = SLOT_W'(s); a_widx = WIDX_W'(w); a_data = rnd();
        model[s][w] = a_data;
      end
    @(negedge clk); a_we = 0;
    for (int n = 0; n < 2000; n++) begin
      automatic int s = $urandom_range(0, SLOTS-1), w = $urandom_range(0, SLOT_WORDS-1);
      @(negedge clk);
      b_re = 1; b_slot = SLOT_W'(s); b_widx = WIDX_W'(w); exp_q = model[s][w];
      // concurrent write elsewhere (or same word: old data must be read)
      a_we = $urandom_range(0, 1);
      a_slot = SLOT_W'($urandom_range(0, SLOTS-1)); a_widx = WIDX_W'($urandom_range(0, SLOT_WORDS-1));
      a_data = rnd();
      @(posedge clk); #1;
      if (a_we) model[a_slot][a_widx] = a_data;
      check(b_data == exp_q, $sformatf("read slot %0d word %0d", s, w));
      @(negedge clk); b_re = 0; a_we = 0;
      b_slot = SLOT_W'($urandom_range(0, SLOTS-1)); b_widx = WIDX_W'($urandom_range(0, SLOT_WORDS-1));
      @(posedge clk); #1;
      check(b_data == exp_q, "data held while b_re low");
    end
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
