// toggle_control: the shift register and the toggle control register.
//
// Every advancing cycle the weighted pseudorandom bit w_in enters the
// n-bit shift register at bit 0 and the register shifts towards the MSB.
// When reload is high (the last shift cycle of a pattern) the toggle
// control register takes the shift register's content, so the control
// register is rewritten once per pattern and stays constant while the
// pattern is shifted. A 1 in control bit i puts hold latch i in toggle
// mode; a 0 puts it in hold mode.
//
// The two registers and the once-per-pattern reload follow the
// architecture. The shift direction, the reload taking the shift register
// value before the same edge's shift, and the reset values (shift register
// all zero, control register all ones, so the first pattern toggles fully)
// are this design's choices.
module toggle_control #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         advance,
  input  logic         w_in,
  input  logic         reload,
  output logic [N-1:0] shift_q,
  output logic [N-1:0] ctrl_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shift_q <= '0;
      ctrl_q  <= '1;
    end else begin
      if (advance) begin
        shift_q <= {shift_q[N-2:0], w_in};
      end
      if (reload) begin
        ctrl_q <= shift_q;
      end
    end
  end

endmodule
