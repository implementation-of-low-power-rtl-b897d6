// tb_presto_top: end-to-end test of the PRESTO generator at its default
// size (32-bit PRPG, 15 scan chains, 64 shift cycles per pattern).
//
// A cycle-level reference model of the whole generator (LFSR, weighted
// logic, shift and control registers, T flip-flop, enables, hold latches,
// phase shifter) runs beside the design, and every scan input, latch
// enable, mode and pattern-end signal is compared in every cycle. The run
// goes through these phases:
//   1. Switching 0000: low power off, every latch toggles.
//   2. Switching 0100, Hold/Toggle 0000: about 25% of the control register
//      bits are 1 after each reload; scan toggling must drop.
//   3. Switching 0100, Toggle 0010, Hold 0001: alternating hold and toggle
//      periods; no scan input may change during a hold period.
//   4. Seed load, stalls (run low) and a reconfiguration mid-pattern.
// Each mechanism is counted and one that never happened is a failure.
module tb_presto_top;
  import presto_pkg::*;
  localparam int N = 32, M = 15, SL = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic run, cfg_we, seed_we;
  presto_cfg_t cfg, cfg_q;
  logic [N-1:0] seed, latch_en, ctrl_q;
  logic [M-1:0] scan_in;
  logic pattern_end, lp_off;
  logic [15:0] pattern_num;
  logic [5:0] shift_cnt;
  mode_e mode;

  presto_top dut (.clk, .rst_n, .run, .cfg_we, .cfg, .seed_we, .seed, .scan_in,
                  .pattern_end, .pattern_num, .shift_cnt, .mode, .lp_off,
                  .latch_en, .ctrl_q, .cfg_q);

  // ---------------- reference model state
  bit m_prpg[N], m_shift[N], m_ctrl[N], m_held[N];
  bit m_toggle;          // 1 = toggle period
  int m_cnt;
  bit [3:0] m_sw, m_hold, m_tog;

  // mechanism counters
  int n_lp_off, n_reload, n_hold_cyc, n_mode_sw, n_latch_hold, n_seed, n_stall, n_cfg;
  int n_hold_violation;
  longint ctrl_ones, ctrl_samples;
  longint tog_p1, cyc_p1, tog_p2, cyc_p2;

  function automatic bit wl(bit [3:0] code, bit r[10]);
    bit g3 = code[3] & r[0];
    bit g2 = code[2] & r[1] & r[2];
    bit g1 = code[1] & r[3] & r[4] & r[5];
    bit g0 = code[0] & r[6] & r[7] & r[8] & r[9];
    return g3 | g2 | g1 | g0;
  endfunction

  // PRPG bits read by the Switching and T-input weighted logic, in gate order
  int sw_bits[10] = '{1, 2, 4, 6, 8, 10, 11, 15, 19, 23};
  int t_bits[10]  = '{14, 24, 31, 9, 0, 13, 17, 20, 3, 5};

  bit c_en[N], c_lq[N], c_scan[M], c_pend, c_t, c_wsw, c_off;

  // combinational part of the model for the current inputs
  task automatic model_comb();
    bit rs[10], rt[10];
    c_off = (m_sw == 4'd0);
    for (int i = 0; i < N; i++) begin
      c_en[i] = (m_ctrl[i] && m_toggle) || c_off;
      c_lq[i] = c_en[i] ? m_prpg[i] : m_held[i];
    end
    for (int j = 0; j < M; j++) c_scan[j] = c_lq[j] ^ c_lq[(j + 7) % N] ^ c_lq[(j + 19) % N];
    for (int k = 0; k < 10; k++) begin
      rs[k] = m_prpg[sw_bits[k]];
      rt[k] = m_prpg[t_bits[k]];
    end
    c_wsw  = wl(m_sw, rs);
    c_t    = wl(m_toggle ? m_tog : m_hold, rt);
    c_pend = run && (m_cnt == SL - 1);
  endtask

  task automatic model_edge();
    bit fb;
    for (int i = 0; i < N; i++) m_held[i] = c_lq[i];
    if (c_pend) begin
      m_ctrl = m_shift;
      n_reload++;
      for (int i = 0; i < N; i++) ctrl_ones += m_ctrl[i];
      ctrl_samples += N;
    end
    if (seed_we) begin
      bit nz = 0;
      for (int i = 0; i < N; i++) begin m_prpg[i] = seed[i]; nz |= seed[i]; end
      if (!nz) m_prpg[0] = 1;
    end else if (run) begin
      fb = m_prpg[31] ^ m_prpg[21] ^ m_prpg[1] ^ m_prpg[0];
      for (int i = N - 1; i > 0; i--) m_prpg[i] = m_prpg[i-1];
      m_prpg[0] = fb;
    end
    if (run) begin
      for (int i = N - 1; i > 0; i--) m_shift[i] = m_shift[i-1];
      m_shift[0] = c_wsw;
      if (c_t) begin m_toggle = !m_toggle; n_mode_sw++; end
      m_cnt = (m_cnt + 1) % SL;
    end
    if (cfg_we) begin m_sw = cfg.switching; m_hold = cfg.hold; m_tog = cfg.toggle; end
  endtask

  logic [M-1:0] prev_scan;

  // one clock cycle: drive inputs, compare, advance both
  task automatic cycle(input int phase);
    #1;  // inputs were changed 1 time unit after the last edge
    model_comb();
    checks++;
    begin
      bit bad = 0;
      for (int j = 0; j < M; j++) if (scan_in[j] !== c_scan[j]) bad = 1;
      for (int i = 0; i < N; i++) if (latch_en[i] !== c_en[i]) bad = 1;
      if (pattern_end !== c_pend || lp_off !== c_off || (mode == MODE_TOGGLE) !== m_toggle) bad = 1;
      if (bad) begin
        failures++;
        if (failures < 10) begin
          $display("t=%0t phase %0d: scan %h en %h pend %b mode %0d lp_off %b differ from model",
                   $time, phase, scan_in, latch_en, pattern_end, mode, lp_off);
          $write("  model scan ");
          for (int j = M - 1; j >= 0; j--) $write("%0d", c_scan[j]);
          $write(" pend %0d toggle %0d off %0d\n", c_pend, m_toggle, c_off);
        end
      end
    end
    if (run) begin
      int t = $countones(scan_in ^ prev_scan);
      if (c_off) n_lp_off++;
      if (!m_toggle && !c_off) begin
        n_hold_cyc++;
        if (t != 0) n_hold_violation++;
      end
      for (int i = 0; i < N; i++) if (!c_en[i]) n_latch_hold++;
      if (phase == 1) begin tog_p1 += t; cyc_p1 += M; end
      if (phase == 2) begin tog_p2 += t; cyc_p2 += M; end
      prev_scan = scan_in;
    end else n_stall++;
    if (seed_we) n_seed++;
    if (cfg_we) n_cfg++;
    @(posedge clk);
    #1;
    model_edge();
  endtask

  task automatic set_cfg(bit [3:0] sw, bit [3:0] hd, bit [3:0] tg);
    cfg = '{switching: sw, hold: hd, toggle: tg};
    cfg_we = 1;
    cycle(0);
    cfg_we = 0;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real frac, r1, r2;

  initial begin
    run = 0; cfg_we = 0; seed_we = 0; cfg = '0; seed = '0;
    foreach (m_prpg[i]) begin m_prpg[i] = (i == 0); m_shift[i] = 0; m_ctrl[i] = 1; m_held[i] = 0; end
    m_toggle = 1; m_cnt = 0; m_sw = 0; m_hold = 0; m_tog = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);
    #1;
    prev_scan = scan_in;
    // phase 1: low power off
    run = 1;
    repeat (4 * SL) cycle(1);
    // phase 2: Switching 0100, stay in toggle periods
    run = 0; set_cfg(4'b0100, 4'b0000, 4'b0000); run = 1;
    ctrl_ones = 0; ctrl_samples = 0;
    repeat (200 * SL) cycle(2);
    begin
      frac = real'(ctrl_ones) / real'(ctrl_samples);
      r1 = real'(tog_p1) / real'(cyc_p1);
      r2 = real'(tog_p2) / real'(cyc_p2);
      $display("control register ones: %0.3f (code 0100 asks for 0.25)", frac);
      $display("scan toggle rate: LP off %0.3f, Switching 0100 %0.3f", r1, r2);
      checks++; if (frac < 0.20 || frac > 0.30) begin failures++; $display("control register fill out of range"); end
      checks++; if (r1 < 0.40 || r1 > 0.60) begin failures++; $display("LP-off toggle rate out of range"); end
      checks++; if (!(r2 < 0.7 * r1) || r2 == 0.0) begin failures++; $display("low-power toggle rate not reduced"); end
    end
    // phase 3: hold and toggle periods
    set_cfg(4'b0100, 4'b0001, 4'b0010);
    repeat (200 * SL) cycle(3);
    // phase 4: seed load, stalls, reconfiguration mid-pattern
    seed = 32'hDEAD_BEEF; seed_we = 1; cycle(4); seed_we = 0;
    for (int c = 0; c < 20 * SL; c++) begin
      run = ($urandom_range(0, 7) != 0);
      if (c == 10 * SL + 17) begin
        cfg = '{switching: 4'b1010, hold: 4'b0100, toggle: 4'b0001};
        cfg_we = 1;
      end
      cycle(4);
      cfg_we = 0;
    end
    checks++; if (cfg_q !== presto_cfg_t'({4'b1010, 4'b0100, 4'b0001})) failures++;
    // mechanisms
    $display("mechanisms: lp_off=%0d reload=%0d hold_cycles=%0d mode_switches=%0d held_latch_bits=%0d seed_loads=%0d stalls=%0d cfg_writes=%0d",
             n_lp_off, n_reload, n_hold_cyc, n_mode_sw, n_latch_hold, n_seed, n_stall, n_cfg);
    checks++; if (n_lp_off == 0)     begin failures++; $display("low-power-off mode never used"); end
    checks++; if (n_reload == 0)     begin failures++; $display("control register never reloaded"); end
    checks++; if (n_hold_cyc == 0)   begin failures++; $display("no hold period"); end
    checks++; if (n_mode_sw == 0)    begin failures++; $display("T flip-flop never switched"); end
    checks++; if (n_latch_hold == 0) begin failures++; $display("no latch ever held"); end
    checks++; if (n_seed == 0)       begin failures++; $display("no seed load"); end
    checks++; if (n_stall == 0)      begin failures++; $display("no stall"); end
    checks++; if (n_cfg == 0)        begin failures++; $display("no configuration write"); end
    checks++; if (n_hold_violation != 0) begin failures++; $display("%0d scan changes during hold periods", n_hold_violation); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
