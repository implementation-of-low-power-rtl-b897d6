// hold_latches: the n hold latches H1..Hn between the PRPG and the phase
// shifter.
//
// While en[i] is high latch i is transparent: q[i] follows prpg[i] in the
// same cycle (toggle mode). While en[i] is low q[i] keeps the value it
// last passed on, so the phase shifter input stays constant (hold mode).
//
// The behaviour is the architecture's. To keep the design free of level-
// sensitive latches, each "latch" is built as a flip-flop that records the
// value it passes on plus a 2:1 multiplexer; seen at the clock edges this
// is the same as a latch that is open while en is high. The flip-flops
// reset to 0, a choice of this design.
module hold_latches #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] prpg,
  input  logic [N-1:0] en,
  output logic [N-1:0] q
);

  logic [N-1:0] held;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      q[i] = en[i] ? prpg[i] : held[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) held <= '0;
    else        held <= q;
  end

endmodule
