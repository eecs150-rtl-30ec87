// Lab3Top: a two-digit combination lock built from the board's rotary knob,
// its push button and two other push buttons.
//
// Data path, left to right:
//   * The knob's quadrature contacts (FPGA_ROTARY_INCA/INCB) go to the
//     RotaryEncoder, which pulses Up or Down on every Gray-code step.
//   * Lab3Counter turns those pulses into the digit being dialled
//     (Combination, shown on LED_Combination). Turning counter-clockwise
//     (Down pulses) raises the digit and clockwise (Up pulses) lowers it;
//     four pulses, one detent, make one digit step.
//   * Pressing the knob (FPGA_ROTARY_PUSH) gives, through a Debouncer, a
//     one-cycle Enter pulse that commits the digit to Lab3Lock.
//   * Lab3Lock opens (LED_Open) after DIGIT1 then DIGIT2 and shows its state
//     on LED_State. A wrong digit leads to an error state that holds.
//   * The ResetLock button (GPIO_COMPSW) relocks the lock, or, with the DIP
//     switches GPIO_DIP_SW not all off, forces it into the state they encode.
//   * The CPU reset button (FPGA_CPU_RESET_B, active low) gives, through its
//     own Debouncer, a one-cycle system Reset for every other block.
//
// The three button debouncers sample on a shared tick that comes every
// 2**DEBOUNCE_TICK_W cycles; a press must be seen on DEBOUNCE_SAMPLES
// successive ticks. With the defaults and an assumed 100 MHz clock that is
// about 1.3 ms. The reset button's own debouncer is never reset: its few
// flip-flops settle by themselves once the button has been still for one
// filter period, which is what makes it usable as the reset source.
//
// Follows the lab's block diagram and text: the blocks, their connections
// and the button roles. This design's choices: the sampling tick, the filter
// length, the reset polarity of the CPU reset button and the LED port names.
module Lab3Top
  import lab3_pkg::*;
#(
  parameter logic [DIGIT_W-1:0] DIGIT1           = DEFAULT_DIGIT1,
  parameter logic [DIGIT_W-1:0] DIGIT2           = DEFAULT_DIGIT2,
  parameter int unsigned        DEBOUNCE_TICK_W  = 14,
  parameter int unsigned        DEBOUNCE_SAMPLES = 8
) (
  input  logic               Clock,
  input  logic               FPGA_CPU_RESET_B,  // system reset button, active low
  input  logic               GPIO_COMPSW,       // ResetLock button
  input  logic               FPGA_ROTARY_PUSH,  // knob push: Enter
  input  logic               FPGA_ROTARY_INCA,  // knob contact A
  input  logic               FPGA_ROTARY_INCB,  // knob contact B
  input  logic [STATE_W-1:0] GPIO_DIP_SW,       // DebugState
  output logic [DIGIT_W-1:0] LED_Combination,
  output logic [STATE_W-1:0] LED_State,
  output logic               LED_Open
);

  logic               Reset, ResetLock, Enter;
  logic               Up, Down;
  logic [DIGIT_W-1:0] Combination;

  // Debounce sampling tick: free-running, so it needs no reset.
  logic [DEBOUNCE_TICK_W-1:0] tick_count;
  logic                       tick;

  always_ff @(posedge Clock) tick_count <= tick_count + 1'b1;
  assign tick = &tick_count;

  Debouncer #(.WIDTH(1), .STABLE_SAMPLES(DEBOUNCE_SAMPLES)) u_reset_parse (
    .Clock (Clock),
    .Reset (1'b0),
    .Enable(tick),
    .In    (~FPGA_CPU_RESET_B),
    .Out   (Reset)
  );

  Debouncer #(.WIDTH(1), .STABLE_SAMPLES(DEBOUNCE_SAMPLES)) u_resetlock_parse (
    .Clock (Clock),
    .Reset (Reset),
    .Enable(tick),
    .In    (GPIO_COMPSW),
    .Out   (ResetLock)
  );

  Debouncer #(.WIDTH(1), .STABLE_SAMPLES(DEBOUNCE_SAMPLES)) u_enter_parse (
    .Clock (Clock),
    .Reset (Reset),
    .Enable(tick),
    .In    (FPGA_ROTARY_PUSH),
    .Out   (Enter)
  );

  RotaryEncoder u_encoder (
    .Clock(Clock),
    .Reset(Reset),
    .A    (FPGA_ROTARY_INCA),
    .B    (FPGA_ROTARY_INCB),
    .Up   (Up),
    .Down (Down)
  );

  Lab3Counter u_counter (
    .Clock    (Clock),
    .Reset    (Reset),
    .Increment(Down),
    .Decrement(Up),
    .Count    (Combination)
  );

  Lab3Lock #(.DIGIT1(DIGIT1), .DIGIT2(DIGIT2)) u_lock (
    .Clock      (Clock),
    .Reset      (Reset),
    .DebugState (GPIO_DIP_SW),
    .ResetLock  (ResetLock),
    .Enter      (Enter),
    .Combination(Combination),
    .State      (LED_State),
    .Open       (LED_Open)
  );

  assign LED_Combination = Combination;

endmodule
