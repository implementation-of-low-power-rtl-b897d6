// enable_logic: forms the enable of every hold latch.
//
// A 4-input NOR detects Switching code 0000, which turns the low-power
// function off (lp_off). AND gates on the toggle control register outputs
// let the T flip-flop freeze all latches during a hold period, whatever
// the control register holds. OR gates then force every enable on while
// lp_off is set:
//     en[i] = (ctrl[i] & toggle_period) | lp_off
// The NOR, AND and OR gates are the architecture's; placing the AND gates
// before the OR gates (so that lp_off also overrides a hold period)
// follows the text, which puts the AND gates directly on the control
// register outputs. Purely combinational.
module enable_logic
  import presto_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  code_t        switching,
  input  logic [N-1:0] ctrl,
  input  mode_e        mode,
  output logic         lp_off,
  output logic [N-1:0] en
);

  always_comb begin
    lp_off = ~|switching;
    en     = (ctrl & {N{mode == MODE_TOGGLE}}) | {N{lp_off}};
  end

endmodule
