// mode_control: splits the shifting of each pattern into alternating hold
// and toggle periods.
//
// A T flip-flop holds the mode (1 = toggle period, 0 = hold period) and
// flips whenever its input is 1. Its input comes from a weighted logic
// block fed with pseudorandom bits; the 4-bit code of that block comes
// through four 2-input multiplexers that pick the Toggle register in a
// toggle period and the Hold register in a hold period. A toggle period
// therefore ends after a random number of cycles set by the Toggle code,
// and a hold period after one set by the Hold code. A code of 0000 keeps
// the generator in that mode for good.
//
// The T flip-flop, the registers, the muxes and the weighted input follow
// the architecture. The reset mode (toggle period) and the ignoring of the
// T input while advance is low are this design's choices.
//
// Timing: the mode changes at the clock edge after a cycle in which t_in
// was 1.
module mode_control
  import presto_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                advance,
  input  code_t               hold_code,
  input  code_t               toggle_code,
  input  logic [WL_BITS-1:0]  rnd,
  output mode_e               mode,
  output logic                t_in
);

  code_t sel_code;

  always_comb begin
    sel_code = (mode == MODE_TOGGLE) ? toggle_code : hold_code;
  end

  weighted_logic u_wl (
    .code (sel_code),
    .rnd  (rnd),
    .w    (t_in)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode <= MODE_TOGGLE;
    end else if (advance && t_in) begin
      mode <= (mode == MODE_TOGGLE) ? MODE_HOLD : MODE_TOGGLE;
    end
  end

endmodule
