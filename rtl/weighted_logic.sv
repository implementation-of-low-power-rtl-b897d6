// weighted_logic: turns uniform pseudorandom bits into one bit that is 1
// with a programmable probability.
//
// Four AND gates see 1, 2, 3 and 4 independent pseudorandom bits, so each
// yields 1 with probability 1/2, 1/4, 1/8 and 1/16. Each gate also has one
// bit of the 4-bit code as an input (bit 3 -> 1/2 ... bit 0 -> 1/16); an
// OR gate merges the enabled gates, giving probabilities between the
// powers of two. Code 0000 gives a constant 0. The gate structure and the
// four weights are the architecture's; which rnd bit goes to which gate is
// this design's choice:
//   gate 1/2    : rnd[0]
//   gate 1/4    : rnd[1] & rnd[2]
//   gate 1/8    : rnd[3] & rnd[4] & rnd[5]
//   gate 1/16   : rnd[6] & rnd[7] & rnd[8] & rnd[9]
// Purely combinational.
module weighted_logic
  import presto_pkg::*;
(
  input  code_t                 code,
  input  logic [WL_BITS-1:0]    rnd,
  output logic                  w
);

  logic [3:0] gate;  // gate[3] is the 1/2 gate, gate[0] the 1/16 gate

  always_comb begin
    gate[3] = code[3] & rnd[0];
    gate[2] = code[2] & rnd[1] & rnd[2];
    gate[1] = code[1] & rnd[3] & rnd[4] & rnd[5];
    gate[0] = code[0] & rnd[6] & rnd[7] & rnd[8] & rnd[9];
    w       = |gate;
  end

endmodule
