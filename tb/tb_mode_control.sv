// tb_mode_control: drives random pseudorandom bits and compares the mode
// with a reference T flip-flop every cycle. Then it measures the mean
// length of toggle and hold periods for Toggle code 1000 (p = 1/2, mean 2
// cycles) and Hold code 0001 (p = 1/16, mean 16 cycles), and checks that
// code 0000 never leaves the current mode.
module tb_mode_control;
  import presto_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic advance; code_t hold_code, toggle_code; logic [WL_BITS-1:0] rnd; mode_e mode; logic t_in;

  mode_control dut (.clk, .rst_n, .advance, .hold_code, .toggle_code, .rnd, .mode, .t_in);

  function automatic logic ref_w(code_t c, logic [9:0] r);
    return (c[3] & r[0]) | (c[2] & (&r[2:1])) | (c[1] & (&r[5:3])) | (c[0] & (&r[9:6]));
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode_e m = MODE_TOGGLE;
    mode_e keep;
    real mean_t, mean_h;
    int tog_cycles = 0, hold_cycles = 0, tog_periods = 0, hold_periods = 0;
    advance = 0; hold_code = 0; toggle_code = 0; rnd = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++; if (mode !== MODE_TOGGLE) failures++;
    // phase 1: random codes, bit-exact check
    for (int c = 0; c < 3000; c++) begin
      automatic logic exp_t;
      advance = ($urandom_range(0, 5) != 0);
      hold_code = code_t'($urandom); toggle_code = code_t'($urandom); rnd = 10'($urandom);
      #1;
      exp_t = ref_w((m == MODE_TOGGLE) ? toggle_code : hold_code, rnd);
      checks++;
      if (t_in !== exp_t) begin failures++; if (failures < 10) $display("cycle %0d t_in %b exp %b", c, t_in, exp_t); end
      @(posedge clk); #1;
      if (advance && exp_t) m = (m == MODE_TOGGLE) ? MODE_HOLD : MODE_TOGGLE;
      checks++;
      if (mode !== m) begin failures++; if (failures < 10) $display("cycle %0d mode %0d exp %0d", c, mode, m); end
    end
    // phase 2: period lengths
    advance = 1; toggle_code = 4'b1000; hold_code = 4'b0001;
    for (int c = 0; c < 40000; c++) begin
      automatic mode_e prev_mode;
      rnd = 10'($urandom);
      prev_mode = mode;
      if (mode == MODE_TOGGLE) tog_cycles += 1; else hold_cycles += 1;
      @(posedge clk); #1;
      if (prev_mode != mode) begin
        if (prev_mode == MODE_TOGGLE) tog_periods += 1; else hold_periods += 1;
      end
    end
    mean_t = real'(tog_cycles) / real'(tog_periods);
    mean_h = real'(hold_cycles) / real'(hold_periods);
    begin
      $display("mean toggle period %0.2f (expect 2), mean hold period %0.2f (expect 16)", mean_t, mean_h);
      checks++; if (mean_t < 1.8 || mean_t > 2.2) failures++;
      checks++; if (mean_h < 14.0 || mean_h > 18.0) failures++;
    end
    // phase 3: code 0000 keeps the mode
    toggle_code = 4'b0000; hold_code = 4'b0000;
    keep = mode;
    begin
      for (int c = 0; c < 500; c++) begin
        rnd = 10'($urandom);
        @(posedge clk); #1;
        checks++; if (mode !== keep) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
