// Lab3Lock_tb: self-checking test of the combination-lock FSM.
//
// Directed sequences walk every arc of the state diagram (right code, wrong
// first digit, wrong second digit, holding in Open and Bad2, ResetLock,
// loading a DebugState, an invalid DebugState, system Reset). Then 4000
// random cycles of Enter/ResetLock/Reset/digit stimulus are checked against a
// reference model kept in this file. Each Enter must show its effect on State
// and Open exactly one clock later.
`timescale 1ns/1ps
module Lab3Lock_tb;
  import lab3_pkg::*;

  logic       Clock = 1'b0;
  logic       Reset, ResetLock, Enter;
  logic [2:0] DebugState;
  logic [3:0] Combination;
  logic [2:0] State;
  logic       Open;

  int checks = 0, failures = 0;

  Lab3Lock dut (.*);

  always #5 Clock = ~Clock;

  initial begin
    repeat (20000) @(posedge Clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model: codes 0 Locked, 1 OK1, 2 Bad1, 3 Open, 4 Bad2.
  int ref_state;
  function automatic int ref_next(int s, bit rst, bit rl, bit [2:0] dbg, bit en, bit [3:0] c);
    if (rst) return 0;
    if (rl)  return (dbg <= 4) ? int'(dbg) : 0;
    if (!en) return s;
    case (s)
      0: return (c == 4'h2) ? 1 : 2;
      1: return (c == 4'h3) ? 3 : 4;
      2: return 4;
      default: return s;
    endcase
  endfunction

  task automatic check_outputs(string what);
    checks++;
    if (State !== 3'(ref_state) || Open !== (ref_state == 3)) begin
      failures++;
      $display("FAIL %s: State=%0d Open=%0b expected State=%0d Open=%0b",
               what, State, Open, ref_state, ref_state == 3);
    end
  endtask

  // Apply one cycle of inputs, then check the registered result.
  task automatic step(bit rst, bit rl, bit [2:0] dbg, bit en, bit [3:0] c, string what);
    Reset = rst; ResetLock = rl; DebugState = dbg; Enter = en; Combination = c;
    ref_state = ref_next(ref_state, rst, rl, dbg, en, c);
    @(posedge Clock); #1;
    check_outputs(what);
  endtask

  task automatic enter_digit(bit [3:0] c, string what);
    step(0, 0, 0, 0, c, {what, " (dial)"});  // no change without Enter
    step(0, 0, 0, 1, c, what);
    step(0, 0, 0, 0, 4'hF, {what, " (hold)"});
  endtask

  initial begin
    Reset = 1; ResetLock = 0; Enter = 0; DebugState = 0; Combination = 0;
    ref_state = 0;
    repeat (2) @(posedge Clock);
    #1;
    check_outputs("after reset");

    // Right combination opens and stays open.
    enter_digit(4'h2, "digit1 right");
    enter_digit(4'h3, "digit2 right");
    enter_digit(4'h7, "open holds");
    enter_digit(4'h2, "open holds 2");
    step(0, 1, 0, 0, 0, "ResetLock relocks");

    // Wrong first digit: Bad1, then Bad2 for any second digit.
    enter_digit(4'h3, "digit1 wrong");
    enter_digit(4'h3, "bad1 any digit");
    enter_digit(4'h2, "bad2 holds");
    step(0, 1, 0, 1, 4'h2, "ResetLock beats Enter");

    // Right first digit, wrong second digit.
    enter_digit(4'h2, "digit1 right again");
    enter_digit(4'h4, "digit2 wrong");
    step(1, 0, 0, 0, 0, "system reset");

    // Bad1 with right second digit still ends in Bad2.
    enter_digit(4'h0, "digit1 wrong 0");
    enter_digit(4'h3, "bad1 then right digit2");

    // DebugState loads, invalid codes give Locked.
    for (int d = 0; d < 8; d++) step(0, 1, 3'(d), 0, 0, "ResetLock to DebugState");
    step(1, 1, 3'd3, 1, 4'h2, "Reset beats ResetLock");

    // Random stimulus.
    for (int i = 0; i < 4000; i++) begin
      bit rst, rl, en;
      bit [3:0] c;
      rst = ($urandom_range(0, 99) == 0);
      rl  = ($urandom_range(0, 19) == 0);
      en  = ($urandom_range(0, 2) == 0);
      c   = ($urandom_range(0, 1) == 0) ? 4'($urandom_range(2, 3)) : 4'($urandom);
      step(rst, rl, 3'($urandom_range(0, 7)), en, c, "random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
