// pattern_counter: the "Pattern count" block. It counts shift cycles of
// the current test pattern and raises pattern_end during the last shift
// cycle of each pattern, which makes the toggle control register reload.
// It also counts the patterns applied so far.
//
// The architecture only names this block; its length (SCAN_LEN shift
// cycles per pattern, the length of the longest scan chain), the pattern
// number output and the advance input are this design's own choices.
//
// Timing: pattern_end is combinational from the counter and is high for
// exactly one advancing cycle out of every SCAN_LEN.
module pattern_counter #(
  parameter int unsigned SCAN_LEN = 64,
  parameter int unsigned PAT_W    = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        advance,
  output logic [$clog2(SCAN_LEN)-1:0] shift_cnt,
  output logic [PAT_W-1:0]            pattern_num,
  output logic                        pattern_end
);

  localparam int unsigned CW = $clog2(SCAN_LEN);

  assign pattern_end = advance && (shift_cnt == CW'(SCAN_LEN - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shift_cnt   <= '0;
      pattern_num <= '0;
    end else if (advance) begin
      if (shift_cnt == CW'(SCAN_LEN - 1)) begin
        shift_cnt   <= '0;
        pattern_num <= pattern_num + 1'b1;
      end else begin
        shift_cnt <= shift_cnt + 1'b1;
      end
    end
  end

endmodule
