// tb_hold_latches: random PRPG words and enables. An enabled latch must
// show the PRPG bit in the same cycle; a disabled one must show the last
// value it showed (0 right after reset).
module tb_hold_latches;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [15:0] prpg, en, q;

  hold_latches #(.N(16)) dut (.clk, .rst_n, .prpg, .en, .q);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] last = '0;
    int held_bits = 0;
    prpg = 0; en = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      logic [15:0] exp_q;
      prpg = 16'($urandom);
      en   = (c % 3 == 0) ? 16'hFFFF : 16'($urandom) & 16'($urandom);
      #1;
      for (int i = 0; i < 16; i++) exp_q[i] = en[i] ? prpg[i] : last[i];
      checks++;
      if (q !== exp_q) begin failures++; if (failures < 10) $display("cycle %0d: q %h exp %h", c, q, exp_q); end
      held_bits += 16 - $countones(en);
      last = exp_q;
      @(posedge clk); #1;
    end
    checks++;
    if (held_bits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
