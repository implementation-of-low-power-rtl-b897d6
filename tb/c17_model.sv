// c17_model: behavioural model of the ISCAS-85 benchmark circuit c17, the
// circuit under test of the C17 workload, with single stuck-at fault
// injection. It is a test fixture, not part of the generator.
//
// c17 has five inputs (G1, G2, G3, G6, G7), six 2-input NAND gates and two
// outputs (G22, G23):
//   G10 = NAND(G1, G3)    G11 = NAND(G3, G6)
//   G16 = NAND(G2, G11)   G19 = NAND(G11, G7)
//   G22 = NAND(G10, G16)  G23 = NAND(G16, G19)
// in = {G7, G6, G3, G2, G1}; out = {G23, G22}. The 11 nets are numbered
// 0..10 in the order G1, G2, G3, G6, G7, G10, G11, G16, G19, G22, G23.
// fault = 0 means fault free; otherwise net (fault-1)/2 is stuck at
// (fault-1)%2, giving the 22 single stuck-at faults 1..22.
module c17_model (
  input  logic [4:0] in,
  input  int         fault,
  output logic [1:0] out
);

  function automatic logic f(int net, logic v, int flt);
    if (flt != 0 && (flt - 1) / 2 == net) return logic'((flt - 1) % 2);
    return v;
  endfunction

  always_comb begin
    logic g1, g2, g3, g6, g7, g10, g11, g16, g19, g22, g23;
    g1  = f(0, in[0], fault);
    g2  = f(1, in[1], fault);
    g3  = f(2, in[2], fault);
    g6  = f(3, in[3], fault);
    g7  = f(4, in[4], fault);
    g10 = f(5, ~(g1 & g3), fault);
    g11 = f(6, ~(g3 & g6), fault);
    g16 = f(7, ~(g2 & g11), fault);
    g19 = f(8, ~(g11 & g7), fault);
    g22 = f(9, ~(g10 & g16), fault);
    g23 = f(10, ~(g16 & g19), fault);
    out = {g23, g22};
  end

endmodule
