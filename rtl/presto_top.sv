// presto_top: fully operational PRESTO generator, a low-power programmable
// pseudorandom pattern generator whose scan-in toggling rate is set by
// three 4-bit codes.
//
// Data path: an N-bit LFSR (prpg_lfsr) feeds N hold latches
// (hold_latches), which feed a phase shifter (phase_shifter) that drives M
// scan chains. A latch that is enabled passes the PRPG bit on; a latch
// that is disabled repeats its last value, so scan chains whose three
// phase-shifter taps are all held receive constant data and do not toggle.
//
// Control path:
//  * weighted_logic u_wl_sw, set by the Switching code, makes a bit that
//    is 1 with the selected probability; it is shifted into the shift
//    register of toggle_control, which is copied into the toggle control
//    register at the end of every pattern (pattern_counter). About that
//    fraction of the latches is in toggle mode during the next pattern.
//  * mode_control's T flip-flop alternates hold periods (every latch
//    frozen) and toggle periods, their lengths set by the Hold and Toggle
//    codes.
//  * enable_logic combines both; Switching code 0000 turns the low-power
//    function off and enables every latch.
//
// The Switching, Hold and Toggle registers live here and are written
// together through cfg_we/cfg. A seed can be loaded into the PRPG through
// seed_we/seed. Everything advances while run is high; with run low the
// generator is frozen.
//
// The PRPG bits used by the two weighted logic blocks are this design's
// choice (SW_TAP and T_TAP below, listed in rnd order: the 1/2 gate's bit,
// the two 1/4 bits, the three 1/8 bits, the four 1/16 bits). In a shift
// register every value passes through every bit position, so the T-input
// logic, which sees its own history, is fed from irregularly spaced bits:
// with evenly spaced taps the hold and toggle periods came out several
// percent off their programmed mean lengths, with these taps within about
// one percent. The Switching logic takes ten of the remaining bits. The
// taps need N >= 32.
//
// Timing: scan_in is combinational from the PRPG state and the latch
// state and is valid in every cycle with run high; a scan chain shifts it
// in at the next rising edge.
module presto_top
  import presto_pkg::*;
#(
  parameter int unsigned N        = 32,
  parameter logic [N-1:0] TAPS    = N'(64'h0000_0000_8020_0003),
  parameter int unsigned M        = 15,
  parameter int unsigned SCAN_LEN = 64,
  parameter int unsigned PAT_W    = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        run,
  input  logic                        cfg_we,
  input  presto_cfg_t                 cfg,
  input  logic                        seed_we,
  input  logic [N-1:0]                seed,
  output logic [M-1:0]                scan_in,
  output logic                        pattern_end,
  output logic [PAT_W-1:0]            pattern_num,
  output logic [$clog2(SCAN_LEN)-1:0] shift_cnt,
  output mode_e                       mode,
  output logic                        lp_off,
  output logic [N-1:0]                latch_en,
  output logic [N-1:0]                ctrl_q,
  output presto_cfg_t                 cfg_q
);

  initial begin
    assert (N >= 32) else $error("presto_top: N must be at least 32");
  end

  // ---------------- Switching / Hold / Toggle registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cfg_q <= '0;
    else if (cfg_we) cfg_q <= cfg;
  end

  // ---------------- PRPG
  logic [N-1:0] prpg_q;

  prpg_lfsr #(.N(N), .TAPS(TAPS)) u_prpg (
    .clk     (clk),
    .rst_n   (rst_n),
    .advance (run),
    .load    (seed_we),
    .seed    (seed),
    .q       (prpg_q)
  );

  localparam int unsigned SW_TAP [WL_BITS] = '{1, 2, 4, 6, 8, 10, 11, 15, 19, 23};
  localparam int unsigned T_TAP  [WL_BITS] = '{14, 24, 31, 9, 0, 13, 17, 20, 3, 5};

  logic [WL_BITS-1:0] rnd_sw, rnd_t;
  always_comb begin
    for (int k = 0; k < int'(WL_BITS); k++) begin
      rnd_sw[k] = prpg_q[SW_TAP[k]];
      rnd_t[k]  = prpg_q[T_TAP[k]];
    end
  end

  // ---------------- Switching level selector and control registers
  logic w_sw;

  weighted_logic u_wl_sw (
    .code (cfg_q.switching),
    .rnd  (rnd_sw),
    .w    (w_sw)
  );

  pattern_counter #(.SCAN_LEN(SCAN_LEN), .PAT_W(PAT_W)) u_patcnt (
    .clk         (clk),
    .rst_n       (rst_n),
    .advance     (run),
    .shift_cnt   (shift_cnt),
    .pattern_num (pattern_num),
    .pattern_end (pattern_end)
  );

  logic [N-1:0] shift_q;

  toggle_control #(.N(N)) u_tctl (
    .clk     (clk),
    .rst_n   (rst_n),
    .advance (run),
    .w_in    (w_sw),
    .reload  (pattern_end),
    .shift_q (shift_q),
    .ctrl_q  (ctrl_q)
  );

  // ---------------- Hold / toggle periods
  logic t_in;

  mode_control u_mode (
    .clk         (clk),
    .rst_n       (rst_n),
    .advance     (run),
    .hold_code   (cfg_q.hold),
    .toggle_code (cfg_q.toggle),
    .rnd         (rnd_t),
    .mode        (mode),
    .t_in        (t_in)
  );

  // ---------------- Latch enables, hold latches, phase shifter
  enable_logic #(.N(N)) u_en (
    .switching (cfg_q.switching),
    .ctrl      (ctrl_q),
    .mode      (mode),
    .lp_off    (lp_off),
    .en        (latch_en)
  );

  logic [N-1:0] latch_q;

  hold_latches #(.N(N)) u_latch (
    .clk   (clk),
    .rst_n (rst_n),
    .prpg  (prpg_q),
    .en    (latch_en),
    .q     (latch_q)
  );

  phase_shifter #(.N(N), .M(M)) u_ps (
    .d       (latch_q),
    .scan_in (scan_in)
  );

endmodule
