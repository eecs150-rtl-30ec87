// Lab3Counter: up/down counter that turns rotary-encoder pulses into one
// combination digit.
//
// The encoder decoder pulses four times per detent of the wheel, so the
// counter keeps 6 bits internally and shows only the upper 4 as Count: the
// digit moves by one for every four pulses. Count rises by one internal step
// on each cycle Increment is high and falls by one on each cycle Decrement is
// high. The internal value wraps modulo 64, so the digit wraps from F to 0
// and from 0 to F.
//
// Interface: Clock, Reset (synchronous, clears the count to 0), Increment,
// Decrement, Count[3:0]. Count changes on the clock edge after the pulse.
//
// Follows the lab text: 6-bit internal count, top 4 bits exposed, reset to 0.
// This design's choices: wrap-around at the ends, and no change when
// Increment and Decrement are high in the same cycle.
module Lab3Counter #(
  parameter int unsigned COUNT_W = 4,  // exposed digit width
  parameter int unsigned SUB_W   = 2   // hidden low-order bits (4 pulses per step)
) (
  input  logic               Clock,
  input  logic               Reset,
  input  logic               Increment,
  input  logic               Decrement,
  output logic [COUNT_W-1:0] Count
);

  logic [COUNT_W+SUB_W-1:0] value;

  always_ff @(posedge Clock) begin
    if (Reset)                       value <= '0;
    else if (Increment && !Decrement) value <= value + 1'b1;
    else if (Decrement && !Increment) value <= value - 1'b1;
  end

  assign Count = value[COUNT_W+SUB_W-1:SUB_W];

endmodule
