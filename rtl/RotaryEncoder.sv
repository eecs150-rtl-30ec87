// RotaryEncoder: quadrature decoder for the board's rotary knob.
//
// The knob's two contacts A and B form a 2-bit Gray code that steps through
// 00 -> 01 -> 11 -> 10 -> 00 ({A,B}) when turned one way and through the
// reverse sequence when turned the other way. The decoder synchronises A and B
// to Clock with two flip-flops each, remembers the last code it saw, and on
// every change to a neighbouring code pulses Up (forward sequence, taken as
// clockwise) or Down (reverse sequence) for one cycle. A jump to the opposite
// code (both bits changed, e.g. from contact bounce) carries no direction and
// is ignored apart from being remembered. One detent of the wheel produces
// four pulses; the digit counter downstream divides them by four.
//
// Interface: Clock, Reset (synchronous; reloads the remembered code from the
// synchronised inputs so no pulse is made), A, B, Up, Down.
// An assertion checks that Up and Down are never high together.
// Timing: a pulse appears 3 cycles after the input edge (two synchroniser
// stages plus the output register).
//
// Follows the lab text: Gray-code tracking, one pulse per code step, the
// port list. This design's choices: the synchroniser, which sequence counts
// as clockwise, and ignoring two-bit jumps.
module RotaryEncoder (
  input  logic Clock,
  input  logic Reset,
  input  logic A,
  input  logic B,
  output logic Up,
  output logic Down
);

  logic [1:0] sync1, sync2;  // two-stage synchroniser for {A,B}
  logic [1:0] last;          // last code acted on
  logic       step_cw, step_ccw;

  // Code that follows c in the clockwise sequence 00, 01, 11, 10.
  function automatic logic [1:0] cw_next(logic [1:0] c);
    unique case (c)
      2'b00: return 2'b01;
      2'b01: return 2'b11;
      2'b11: return 2'b10;
      default: return 2'b00;  // 2'b10
    endcase
  endfunction

  always_ff @(posedge Clock) begin
    sync1 <= {A, B};
    sync2 <= sync1;
  end

  assign step_cw  = (sync2 == cw_next(last));
  assign step_ccw = (last == cw_next(sync2));

  always_ff @(posedge Clock) begin
    if (Reset) begin
      last <= sync2;
      Up   <= 1'b0;
      Down <= 1'b0;
    end else begin
      last <= sync2;
      Up   <= step_cw;
      Down <= step_ccw;
    end
  end

  // A step has one direction only.
  always_comb a_one_direction: assert (!(step_cw && step_ccw));

endmodule
