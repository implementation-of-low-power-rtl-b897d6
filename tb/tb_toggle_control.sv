// tb_toggle_control: drives random weighted bits with random stalls and a
// reload every few cycles; the shift register and control register are
// compared with a bit-list reference every cycle, and the control
// register must stay unchanged between reloads.
module tb_toggle_control;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic advance, w_in, reload; logic [7:0] shift_q, ctrl_q;

  toggle_control #(.N(8)) dut (.clk, .rst_n, .advance, .w_in, .reload, .shift_q, .ctrl_q);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit sh[8], ct[8];
    int reloads = 0;
    foreach (sh[i]) begin sh[i] = 0; ct[i] = 1; end
    advance = 0; w_in = 0; reload = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      advance = ($urandom_range(0, 4) != 0);
      w_in    = $urandom_range(0, 1);
      reload  = ($urandom_range(0, 6) == 0);
      @(posedge clk); #1;
      if (reload) begin ct = sh; reloads++; end
      if (advance) begin
        for (int i = 7; i > 0; i--) sh[i] = sh[i-1];
        sh[0] = w_in;
      end
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (shift_q[i] !== sh[i] || ctrl_q[i] !== ct[i]) begin
          failures++;
          if (failures < 10) $display("cycle %0d bit %0d: shift %b/%b ctrl %b/%b", c, i, shift_q[i], sh[i], ctrl_q[i], ct[i]);
        end
      end
    end
    checks++;
    if (reloads < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
