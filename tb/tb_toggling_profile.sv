// tb_toggling_profile: measures the scan toggling profile of the default
// generator (15 scan chains) for every Switching code and for several
// Hold/Toggle settings.
//
// For a Switching code with weight p = 1 - prod(1 - p_k) (p_k = 1/2, 1/4,
// 1/8, 1/16 for the code bits that are set) about a fraction p of the
// toggle control register is 1 after each reload, and a scan input, being
// the XOR of three latches, toggles with probability about
// 0.5 * (1 - (1 - p)^3). With Hold and Toggle codes of weight ph and pt the
// generator spends a fraction (1/pt) / (1/pt + 1/ph) of the cycles in
// toggle periods, which scales the rate down further. Each measured value
// must lie within a tolerance of these estimates, and code 0000 must give
// the full rate of 0.5.
module tb_toggling_profile;
  import presto_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic run = 0, cfg_we = 0, seed_we = 0;
  presto_cfg_t cfg = '0, cfg_q;
  logic [31:0] seed = '0, latch_en, ctrl_q;
  logic [14:0] scan_in;
  logic pattern_end, lp_off;
  logic [15:0] pattern_num;
  logic [5:0] shift_cnt;
  mode_e mode;

  presto_top dut (.clk, .rst_n, .run, .cfg_we, .cfg, .seed_we, .seed, .scan_in,
                  .pattern_end, .pattern_num, .shift_cnt, .mode, .lp_off,
                  .latch_en, .ctrl_q, .cfg_q);

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real weight(bit [3:0] c);
    real pz = 1.0;
    if (c[3]) pz *= 0.5;
    if (c[2]) pz *= 0.75;
    if (c[1]) pz *= 0.875;
    if (c[0]) pz *= 0.9375;
    return 1.0 - pz;
  endfunction

  // measure over `patterns` patterns: control register fill, scan toggle
  // rate and fraction of cycles in toggle periods
  task automatic measure(input presto_cfg_t c, input int patterns,
                         output real fill, output real rate, output real tog_frac);
    longint ones = 0, reloads = 0, toggles = 0, cyc = 0, tog_cyc = 0;
    logic [14:0] prev;
    cfg = c; cfg_we = 1;
    @(posedge clk); #1;
    cfg_we = 0;
    run = 1;
    // let one pattern pass so the control register reflects the new code
    while (!pattern_end) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    prev = scan_in;
    for (int k = 0; k < patterns * 64; k++) begin
      @(posedge clk); #1;
      toggles += $countones(scan_in ^ prev);
      prev = scan_in;
      cyc++;
      if (mode == MODE_TOGGLE) tog_cyc++;
      if (shift_cnt == 0) begin ones += $countones(ctrl_q); reloads++; end
    end
    run = 0;
    fill = real'(ones) / real'(reloads * 32);
    rate = real'(toggles) / real'(cyc * 15);
    tog_frac = real'(tog_cyc) / real'(cyc);
  endtask

  real fill, rate, tf, p, exp_rate, exp_tf, pt, ph;
  bit [3:0] hold_set[4] = '{4'b1000, 4'b0100, 4'b0010, 4'b0001};
  bit [3:0] tog_set[4]  = '{4'b1000, 4'b0010, 4'b0100, 4'b1000};

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    $display("Switching  weight  fill   toggle-rate  expected");
    for (int c = 0; c < 16; c++) begin
      measure('{switching: c[3:0], hold: 4'b0000, toggle: 4'b0000}, 120, fill, rate, tf);
      p = (c == 0) ? 1.0 : weight(c[3:0]);
      exp_rate = 0.5 * (1.0 - (1.0 - p) * (1.0 - p) * (1.0 - p));
      $display("  %b     %0.3f   %0.3f  %0.3f        %0.3f", c[3:0], p, fill, rate, exp_rate);
      checks++;
      if (c != 0 && (fill < p - 0.05 || fill > p + 0.05)) begin failures++; $display("    control fill out of range"); end
      checks++;
      if (rate < exp_rate - 0.06 || rate > exp_rate + 0.06) begin failures++; $display("    toggle rate out of range"); end
    end
    $display("Switching 1000 with Hold/Toggle periods:");
    for (int s = 0; s < 4; s++) begin
      measure('{switching: 4'b1000, hold: hold_set[s], toggle: tog_set[s]}, 200, fill, rate, tf);
      ph = weight(hold_set[s]); pt = weight(tog_set[s]);
      exp_tf = (1.0 / pt) / (1.0 / pt + 1.0 / ph);
      exp_rate = 0.5 * (1.0 - 0.125) * exp_tf;
      $display("  hold %b toggle %b: toggle-period fraction %0.3f (expected %0.3f), rate %0.3f (expected about %0.3f)",
               hold_set[s], tog_set[s], tf, exp_tf, rate, exp_rate);
      checks++;
      if (tf < exp_tf - 0.03 || tf > exp_tf + 0.03) begin failures++; $display("    toggle-period fraction out of range"); end
      checks++;
      if (rate < exp_rate - 0.08 || rate > exp_rate + 0.08) begin failures++; $display("    toggle rate out of range"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
