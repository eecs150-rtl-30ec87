// Lab3Top_tb: end-to-end test of the combination lock with every parameter
// at its default (combination 0x2, 0x3; debounce tick every 2**14 cycles,
// 8 samples).
//
// The test plays a user at the board: it presses the reset button, turns the
// knob by driving the two quadrature contacts through Gray-code steps (with
// contact bounce), presses the knob to enter each digit (with switch bounce),
// and uses the ResetLock button and the DIP switches. After every action it
// compares the LEDs with a reference: the digit is the net number of
// counter-clockwise steps divided by four, modulo 16, and the lock state
// follows the state diagram. It counts how often each mechanism happened
// (encoder Up and Down pulses, digit wrap in both directions, rejected
// button bounce, Enter, each lock state reached, ResetLock, DebugState load,
// system reset) and fails if any of them never did.
`timescale 1ns/1ps
module Lab3Top_tb;
  localparam int TICK = 1 << 14;  // debounce sampling period, cycles
  localparam int S    = 8;        // debounce samples
  localparam int SETTLE = (S + 2) * TICK;

  logic       Clock = 1'b0;
  logic       FPGA_CPU_RESET_B, GPIO_COMPSW, FPGA_ROTARY_PUSH;
  logic       FPGA_ROTARY_INCA, FPGA_ROTARY_INCB;
  logic [2:0] GPIO_DIP_SW;
  logic [3:0] LED_Combination;
  logic [2:0] LED_State;
  logic       LED_Open;

  Lab3Top dut (.*);

  always #5 Clock = ~Clock;

  int checks = 0, failures = 0;

  initial begin
    repeat (60_000_000) @(posedge Clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters ----
  int n_up = 0, n_down = 0, n_enter = 0, n_resetlock = 0, n_sysreset = 0;
  int n_wrap_up = 0, n_wrap_down = 0, n_bounce_rejected = 0, n_debug_load = 0;
  int n_state [5];
  int exp_up = 0, exp_down = 0;  // pulses the knob moves should give
  int enter_pulses_seen = 0;

  always @(posedge Clock) begin
    if (dut.Up)    n_up++;
    if (dut.Down)  n_down++;
    if (dut.Enter) enter_pulses_seen++;
  end

  // ---- reference model ----
  int ref_sub;    // 6-bit internal count, 0..63
  int ref_state;  // 0 Locked, 1 OK1, 2 Bad1, 3 Open, 4 Bad2

  function automatic int lock_next(int s, int c);
    case (s)
      0: return (c == 2) ? 1 : 2;
      1: return (c == 3) ? 3 : 4;
      2: return 4;
      default: return s;
    endcase
  endfunction

  task automatic check_leds(string what);
    checks++;
    if (LED_Combination !== 4'(ref_sub / 4) || LED_State !== 3'(ref_state)
        || LED_Open !== (ref_state == 3)) begin
      failures++;
      $display("FAIL %s: digit=%h state=%0d open=%0b, expected digit=%h state=%0d open=%0b",
               what, LED_Combination, LED_State, LED_Open, ref_sub / 4, ref_state,
               ref_state == 3);
    end
  endtask

  task automatic wait_cycles(int n);
    repeat (n) @(posedge Clock);
    #1;
  endtask

  // ---- knob ----
  logic [1:0] knob;  // {A,B}
  function automatic logic [1:0] cw_next(logic [1:0] c);
    case (c)
      2'b00: return 2'b01;
      2'b01: return 2'b11;
      2'b11: return 2'b10;
      default: return 2'b00;
    endcase
  endfunction
  function automatic logic [1:0] ccw_next(logic [1:0] c);
    case (c)
      2'b00: return 2'b10;
      2'b10: return 2'b11;
      2'b11: return 2'b01;
      default: return 2'b00;
    endcase
  endfunction

  task automatic set_knob(logic [1:0] c);
    knob = c;
    {FPGA_ROTARY_INCA, FPGA_ROTARY_INCB} = c;
    wait_cycles(8);
  endtask

  // One Gray-code step; with bounce, the contact flips back and forth first.
  task automatic knob_step(bit ccw, bit bounce);
    logic [1:0] from, to;
    int prev;
    from = knob;
    to = ccw ? ccw_next(from) : cw_next(from);
    if (bounce) begin
      set_knob(to);
      set_knob(from);
      exp_up++;
      exp_down++;
    end
    set_knob(to);
    if (ccw) exp_down++;
    else     exp_up++;
    prev = ref_sub;
    ref_sub = ccw ? (ref_sub + 1) % 64 : (ref_sub + 63) % 64;
    if (prev == 63 && ref_sub == 0) n_wrap_up++;
    if (prev == 0 && ref_sub == 63) n_wrap_down++;
  endtask

  // Turn by whole detents: positive is counter-clockwise (digit up).
  task automatic turn(int detents);
    for (int i = 0; i < 4 * (detents < 0 ? -detents : detents); i++)
      knob_step(detents > 0, (i % 3) == 1);
    check_leds($sformatf("turn %0d", detents));
  endtask

  task automatic dial(int digit);
    int cur, d;
    cur = ref_sub / 4;
    d = (digit - cur + 16) % 16;
    if (d > 8) d = d - 16;
    turn(d);
  endtask

  // ---- buttons ----
  // Bounce: high for 2 samples, low for 2, a few times (never S in a row).
  task automatic bounce_on(ref logic sig, input logic active);
    for (int k = 0; k < 3; k++) begin
      sig = active;  wait_cycles(2 * TICK);
      sig = !active; wait_cycles(2 * TICK);
    end
    n_bounce_rejected++;
  endtask

  task automatic press_enter(bit bounce);
    int before_pulses;
    before_pulses = enter_pulses_seen;
    if (bounce) bounce_on(FPGA_ROTARY_PUSH, 1'b1);
    checks++;
    if (enter_pulses_seen != before_pulses) begin
      failures++;
      $display("FAIL: bounce on the knob button produced an Enter");
    end
    FPGA_ROTARY_PUSH = 1'b1;
    wait_cycles(SETTLE);
    FPGA_ROTARY_PUSH = 1'b0;
    wait_cycles(SETTLE);
    checks++;
    if (enter_pulses_seen != before_pulses + 1) begin
      failures++;
      $display("FAIL: one press gave %0d Enter pulses", enter_pulses_seen - before_pulses);
    end
    n_enter++;
    ref_state = lock_next(ref_state, ref_sub / 4);
    n_state[ref_state]++;
    check_leds($sformatf("enter digit %h", ref_sub / 4));
  endtask

  task automatic press_resetlock(logic [2:0] dip);
    GPIO_DIP_SW = dip;
    GPIO_COMPSW = 1'b1;
    wait_cycles(SETTLE);
    GPIO_COMPSW = 1'b0;
    wait_cycles(SETTLE);
    n_resetlock++;
    ref_state = (dip <= 4) ? int'(dip) : 0;
    if (dip != 0 && dip <= 4) n_debug_load++;
    n_state[ref_state]++;
    check_leds($sformatf("ResetLock with DebugState %0d", dip));
    GPIO_DIP_SW = 3'd0;
  endtask

  task automatic press_reset(bit bounce);
    if (bounce) bounce_on(FPGA_CPU_RESET_B, 1'b0);
    FPGA_CPU_RESET_B = 1'b0;
    wait_cycles(SETTLE);
    FPGA_CPU_RESET_B = 1'b1;
    wait_cycles(SETTLE);
    n_sysreset++;
    ref_state = 0;
    ref_sub = 0;
    n_state[0]++;
    check_leds("system reset");
  endtask

  initial begin
    for (int i = 0; i < 5; i++) n_state[i] = 0;
    FPGA_CPU_RESET_B = 1'b1; GPIO_COMPSW = 1'b0; FPGA_ROTARY_PUSH = 1'b0;
    GPIO_DIP_SW = 3'd0;
    knob = 2'b00;
    {FPGA_ROTARY_INCA, FPGA_ROTARY_INCB} = 2'b00;
    ref_sub = 0; ref_state = 0;
    wait_cycles(SETTLE);  // the reset button's filter settles by itself
    press_reset(1'b0);

    // 1. The right combination opens the lock; Open holds.
    dial(2);  press_enter(1'b1);
    dial(3);  press_enter(1'b0);
    dial(9);  press_enter(1'b0);
    press_resetlock(3'd0);

    // 2. Wrong first digit: Bad1, then Bad2 whatever comes next.
    dial(5);  press_enter(1'b0);
    dial(3);  press_enter(1'b1);
    press_resetlock(3'd0);

    // 3. Right first digit, wrong second digit.
    dial(2);  press_enter(1'b0);
    dial(4);  press_enter(1'b0);

    // 4. Digit wraps both ways: down past 0 to F, then up past F.
    press_reset(1'b1);
    turn(-1);
    turn(2);
    // and the lock still opens after wrapping.
    dial(2);  press_enter(1'b0);
    dial(3);  press_enter(1'b0);

    // 5. ResetLock with DebugState: force OK1, then open from there.
    press_resetlock(3'd1);
    press_enter(1'b0);
    press_resetlock(3'd7);  // unused code: relocks

    $display("mechanisms: up=%0d down=%0d wrap_up=%0d wrap_down=%0d enter=%0d bounce=%0d",
             n_up, n_down, n_wrap_up, n_wrap_down, n_enter, n_bounce_rejected);
    $display("            resetlock=%0d debug_load=%0d sysreset=%0d states=%0d/%0d/%0d/%0d/%0d",
             n_resetlock, n_debug_load, n_sysreset,
             n_state[0], n_state[1], n_state[2], n_state[3], n_state[4]);
    checks++;
    if (n_up == 0 || n_down == 0 || n_wrap_up == 0 || n_wrap_down == 0 || n_enter == 0
        || n_bounce_rejected == 0 || n_resetlock == 0 || n_debug_load == 0
        || n_sysreset == 0 || n_state[1] == 0 || n_state[2] == 0 || n_state[3] == 0
        || n_state[4] == 0) begin
      failures++;
      $display("FAIL: a mechanism was never exercised");
    end
    // One encoder pulse per Gray-code step, bounce included.
    checks++;
    if (n_up != exp_up || n_down != exp_down) begin
      failures++;
      $display("FAIL: Up/Down pulses %0d/%0d, expected %0d/%0d", n_up, n_down, exp_up, exp_down);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
