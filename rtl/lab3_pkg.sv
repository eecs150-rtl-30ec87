// lab3_pkg: types and constants shared by the combination-lock modules.
//
// lock_state_t names the five states of the lock FSM (Locked, OK1, Bad1,
// Open, Bad2). The state names and the transitions between them follow the
// lock's state diagram; the 3-bit binary codes are this design's choice.
// Locked is code 0 so that an all-off debug switch setting means "locked".
// DEFAULT_DIGIT1/2 are the sample combination 0x2, 0x3.
package lab3_pkg;

  localparam int unsigned STATE_W = 3;  // width of the State debug output
  localparam int unsigned DIGIT_W = 4;  // one hexadecimal combination digit

  typedef enum logic [STATE_W-1:0] {
    S_LOCKED = 3'd0,
    S_OK1    = 3'd1,
    S_BAD1   = 3'd2,
    S_OPEN   = 3'd3,
    S_BAD2   = 3'd4
  } lock_state_t;

  localparam logic [DIGIT_W-1:0] DEFAULT_DIGIT1 = 4'h2;
  localparam logic [DIGIT_W-1:0] DEFAULT_DIGIT2 = 4'h3;

  // True for the codes that name a state; the other three codes are unused.
  function automatic logic is_valid_state(logic [STATE_W-1:0] s);
    return s <= 3'd4;
  endfunction

endpackage
