// Lab3Counter_tb: self-checking test of the digit counter.
//
// Checks that Count moves one digit per four Increment (or Decrement) cycles,
// that it wraps from F to 0 and from 0 to F, that both inputs high together
// change nothing, and that Reset clears it. A reference count kept here is
// compared with Count after every clock edge, through directed runs and 3000
// random cycles.
`timescale 1ns/1ps
module Lab3Counter_tb;
  logic       Clock = 1'b0;
  logic       Reset, Increment, Decrement;
  logic [3:0] Count;

  int checks = 0, failures = 0;
  int ref_value;  // 0..63
  int wraps_up = 0, wraps_down = 0;

  Lab3Counter dut (.*);

  always #5 Clock = ~Clock;

  initial begin
    repeat (10000) @(posedge Clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(bit rst, bit inc, bit dec);
    int prev_value;
    Reset = rst; Increment = inc; Decrement = dec;
    prev_value = ref_value;
    if (rst)             ref_value = 0;
    else if (inc && !dec) ref_value = (ref_value + 1) % 64;
    else if (dec && !inc) ref_value = (ref_value + 63) % 64;
    if (!rst && prev_value == 63 && ref_value == 0) wraps_up++;
    if (!rst && prev_value == 0 && ref_value == 63) wraps_down++;
    @(posedge Clock); #1;
    checks++;
    if (Count !== 4'(ref_value / 4)) begin
      failures++;
      $display("FAIL: Count=%h expected %h (inc=%0b dec=%0b rst=%0b)",
               Count, ref_value / 4, inc, dec, rst);
    end
  endtask

  initial begin
    ref_value = 0;
    step(1, 0, 0);
    // Four pulses per digit step, all the way round (wraps F -> 0).
    for (int i = 0; i < 68; i++) step(0, 1, 0);
    // And back down past zero (wraps 0 -> F).
    for (int i = 0; i < 72; i++) step(0, 0, 1);
    // Both high: no change.
    for (int i = 0; i < 5; i++) step(0, 1, 1);
    step(1, 1, 0);
    for (int i = 0; i < 3000; i++)
      step($urandom_range(0, 199) == 0, $urandom_range(0, 1) == 1, $urandom_range(0, 1) == 1);

    checks++;
    if (wraps_up == 0 || wraps_down == 0) begin
      failures++;
      $display("FAIL: wrap-around not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
