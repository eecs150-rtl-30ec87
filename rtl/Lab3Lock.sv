// Lab3Lock: two-digit combination lock, written as a Moore FSM.
//
// The user dials a hexadecimal digit and commits it with a one-cycle Enter
// pulse. From Locked, a first digit equal to DIGIT1 leads to OK1, any other
// digit to Bad1. From OK1 a second digit equal to DIGIT2 opens the lock
// (Open); any other digit goes to Bad2. From Bad1 the second digit, whatever
// it is, goes to Bad2, so a wrong first digit is only reported after both
// digits are in. Open and Bad2 hold until the lock is reset. Open is high only
// in the Open state; State shows the current state code for debugging.
//
// The three parts of a Moore machine are kept apart: next-state logic in an
// always_comb block, the state register in an always_ff block, and the
// outputs as continuous assignments of the current state only.
//
// Reset (synchronous, highest priority) puts the lock in Locked.
// ResetLock (synchronous) closes the lock: it loads DebugState when that is a
// valid state code and Locked otherwise, so with DebugState = 0 it simply
// relocks. Enter is acted on only when neither reset is high. All inputs are
// sampled on the rising edge of Clock; outputs change one cycle after the
// Enter pulse that causes them.
//
// Follows the lab text: the states, transitions, Moore structure, the port
// list and the sample combination 0x2/0x3. This design's choices: the state
// codes (see lab3_pkg), the synchronous resets, ResetLock's handling of
// invalid DebugState codes, and recovery to Locked from an unused code.
module Lab3Lock
  import lab3_pkg::*;
#(
  parameter logic [DIGIT_W-1:0] DIGIT1 = DEFAULT_DIGIT1,
  parameter logic [DIGIT_W-1:0] DIGIT2 = DEFAULT_DIGIT2
) (
  input  logic               Clock,
  input  logic               Reset,
  input  logic [STATE_W-1:0] DebugState,
  input  logic               ResetLock,
  input  logic               Enter,
  input  logic [DIGIT_W-1:0] Combination,
  output logic [STATE_W-1:0] State,
  output logic               Open
);

  lock_state_t cur_state, next_state;

  // Next-state logic.
  always_comb begin
    next_state = cur_state;
    if (ResetLock) begin
      next_state = is_valid_state(DebugState) ? lock_state_t'(DebugState) : S_LOCKED;
    end else if (Enter) begin
      unique case (cur_state)
        S_LOCKED: next_state = (Combination == DIGIT1) ? S_OK1 : S_BAD1;
        S_OK1:    next_state = (Combination == DIGIT2) ? S_OPEN : S_BAD2;
        S_BAD1:   next_state = S_BAD2;
        S_OPEN:   next_state = S_OPEN;
        S_BAD2:   next_state = S_BAD2;
        default:  next_state = S_LOCKED;
      endcase
    end else if (!is_valid_state(cur_state)) begin
      next_state = S_LOCKED;
    end
  end

  // State register.
  always_ff @(posedge Clock) begin
    if (Reset) cur_state <= S_LOCKED;
    else       cur_state <= next_state;
  end

  // Output logic: a function of the current state only.
  assign State = cur_state;
  assign Open  = (cur_state == S_OPEN);

endmodule
