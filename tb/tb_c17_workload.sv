// tb_c17_workload: the generator as a test-per-clock source for the c17
// benchmark. Scan inputs 0..4 of the default-size generator drive the five
// c17 inputs every cycle; a fault-free c17 (reference) and a copy with one
// stuck-at fault (tested) run side by side, and a fault counts as detected
// once their outputs differ. All 22 single stuck-at faults are run, each
// for 1024 cycles, once with the low-power function off (Switching 0000)
// and once with Switching 0100, Hold 0001, Toggle 0010.
//
// Checks: every fault is detected in both settings, and the number of
// c17 input transitions (a proxy for test power) is lower in the
// low-power setting.
module tb_c17_workload;
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

  int fault;
  logic [1:0] ref_out, tst_out;
  c17_model u_ref (.in(scan_in[4:0]), .fault(0),     .out(ref_out));
  c17_model u_tst (.in(scan_in[4:0]), .fault(fault), .out(tst_out));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // runs all faults with one configuration; returns detected count and
  // input transitions
  task automatic run_faults(input presto_cfg_t c, output int detected, output longint transitions);
    detected = 0; transitions = 0;
    cfg = c; cfg_we = 1; seed = 32'h1234_5678; seed_we = 1;
    @(posedge clk); #1;
    cfg_we = 0; seed_we = 0;
    for (int f = 1; f <= 22; f++) begin
      logic [4:0] prev;
      bit hit = 0;
      fault = f;
      run = 1;
      prev = scan_in[4:0];
      for (int k = 0; k < 1024; k++) begin
        #1;
        if (ref_out !== tst_out) hit = 1;
        transitions += $countones(scan_in[4:0] ^ prev);
        prev = scan_in[4:0];
        @(posedge clk); #1;
      end
      run = 0;
      if (hit) detected++;
      else $display("fault %0d (net %0d stuck-at %0d) not detected", f, (f - 1) / 2, (f - 1) % 2);
    end
  endtask

  int det_off, det_lp;
  longint tr_off, tr_lp;

  initial begin
    fault = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    run_faults('{switching: 4'b0000, hold: 4'b0000, toggle: 4'b0000}, det_off, tr_off);
    run_faults('{switching: 4'b0100, hold: 4'b0001, toggle: 4'b0010}, det_lp, tr_lp);
    $display("c17: LP off detects %0d/22 faults with %0d input transitions", det_off, tr_off);
    $display("c17: LP on  detects %0d/22 faults with %0d input transitions", det_lp, tr_lp);
    checks++; if (det_off != 22) failures++;
    checks++; if (det_lp != 22) failures++;
    checks++; if (!(tr_lp < tr_off)) begin failures++; $display("no reduction of input transitions"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
