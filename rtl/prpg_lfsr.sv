// prpg_lfsr: the n-bit pseudorandom pattern generator of PRESTO, built as
// a Fibonacci linear feedback shift register.
//
// Every clock the register shifts towards the MSB and the XOR of the tap
// bits enters at bit 0. TAPS is a mask of the feedback taps: bit k-1 set
// means x^k is in the feedback polynomial. The default is the primitive
// polynomial x^32 + x^22 + x^2 + x + 1, so the sequence has period
// 2^32 - 1. A synchronous load writes SEED (or, on reset, SEED_INIT);
// an all-zero seed would lock the register and is replaced by 1.
//
// The generator's job (an n-bit LFSR feeding hold latches and a phase
// shifter) follows the architecture; the width, the polynomial, the
// Fibonacci form and the seed port are this design's own choices.
//
// Timing: q changes one clock edge after rst_n is released or load is
// seen; with advance low the state is frozen.
module prpg_lfsr #(
  parameter int unsigned          N         = 32,
  parameter logic [N-1:0]         TAPS      = N'(64'h0000_0000_8020_0003),
  parameter logic [N-1:0]         SEED_INIT = N'(1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         advance,  // shift one step this cycle
  input  logic         load,     // load seed (has priority over advance)
  input  logic [N-1:0] seed,
  output logic [N-1:0] q
);

  logic fb;
  assign fb = ^(q & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= (SEED_INIT == '0) ? N'(1) : SEED_INIT;
    end else if (load) begin
      q <= (seed == '0) ? N'(1) : seed;
    end else if (advance) begin
      q <= {q[N-2:0], fb};
    end
  end

endmodule
