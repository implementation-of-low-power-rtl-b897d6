// phase_shifter: drives M scan chains from the N hold latch outputs. Each
// output is the XOR of three different latch outputs, so a scan chain
// receives a constant value exactly while all three of its latches hold.
//
// The three-input XOR per output is the architecture's; the tap choice is
// this design's: output j uses latches
//     j mod N,  (j + OFF1) mod N,  (j + OFF2) mod N
// with 0 < OFF1 < OFF2 < N, which keeps the three distinct. With the
// defaults (N = 32, M = 15, OFF1 = 7, OFF2 = 19) every latch feeds at
// least one output. Purely combinational.
module phase_shifter #(
  parameter int unsigned N    = 32,
  parameter int unsigned M    = 15,
  parameter int unsigned OFF1 = 7,
  parameter int unsigned OFF2 = 19
) (
  input  logic [N-1:0] d,
  output logic [M-1:0] scan_in
);

  initial begin
    assert (OFF1 > 0 && OFF1 < OFF2 && OFF2 < N)
      else $error("phase_shifter: offsets must satisfy 0 < OFF1 < OFF2 < N");
  end

  always_comb begin
    for (int j = 0; j < M; j++) begin
      scan_in[j] = d[j % N] ^ d[(j + OFF1) % N] ^ d[(j + OFF2) % N];
    end
  end

endmodule
