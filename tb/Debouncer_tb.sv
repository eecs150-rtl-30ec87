// Debouncer_tb: self-checking test of the button filter.
//
// A 2-bit instance with STABLE_SAMPLES = 4 and a sampling tick every
// P = 4 cycles. Checks: a clean press gives exactly one pulse, one cycle
// wide, between (S-1)*P+3 and S*P+3 cycles after the press; holding and
// releasing give no further pulse; a press that bounces (high for at most
// two samples at a time) gives no pulse until it settles, then one; nothing
// passes while Enable is low; Reset clears a pending press; the two bits are
// filtered independently.
`timescale 1ns/1ps
module Debouncer_tb;
  localparam int S = 4;  // STABLE_SAMPLES
  localparam int P = 4;  // Enable period in cycles

  logic       Clock = 1'b0;
  logic       Reset, Enable;
  logic [1:0] In, Out;
  logic       gate;  // lets the test stop the tick

  int checks = 0, failures = 0;
  int pulses [2];
  int last_pulse_cycle [2];
  int cycle = 0;
  logic [1:0] prev_out = '0;
  int tick_count = 0;

  Debouncer #(.WIDTH(2), .STABLE_SAMPLES(S)) dut (.*);

  always #5 Clock = ~Clock;

  initial begin
    repeat (20000) @(posedge Clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sampling tick, one cycle in every P, while gate is high.
  always_ff @(posedge Clock) tick_count <= (tick_count + 1) % P;
  assign Enable = gate && (tick_count == 0);

  // Pulse bookkeeping on every cycle.
  always @(posedge Clock) begin
    #1;
    cycle++;
    for (int b = 0; b < 2; b++) begin
      if (Out[b]) begin
        pulses[b]++;
        last_pulse_cycle[b] = cycle;
        if (prev_out[b]) begin
          failures++;
          $display("FAIL: bit %0d pulse longer than one cycle", b);
        end
      end
    end
    prev_out = Out;
  end

  task automatic expect_pulses(int b, int n, string what);
    checks++;
    if (pulses[b] != n) begin
      failures++;
      $display("FAIL %s: bit %0d gave %0d pulses, expected %0d", what, b, pulses[b], n);
    end
    pulses[b] = 0;
  endtask

  task automatic wait_cycles(int n);
    repeat (n) @(posedge Clock);
    #2;
  endtask

  initial begin
    int press_cycle, lat;
    gate = 1; In = '0; Reset = 1;
    pulses[0] = 0; pulses[1] = 0;
    wait_cycles(4);
    Reset = 0;
    wait_cycles(4 * S * P);
    pulses[0] = 0; pulses[1] = 0;

    // Clean press of bit 0: one pulse, latency within the filter window.
    for (int trial = 0; trial < 4; trial++) begin
      wait_cycles(trial);  // vary the phase against the tick
      press_cycle = cycle;
      In[0] = 1'b1;
      wait_cycles(4 * S * P);
      expect_pulses(0, 1, "clean press");
      expect_pulses(1, 0, "other bit idle");
      lat = last_pulse_cycle[0] - press_cycle;
      checks++;
      if (lat < (S - 1) * P + 3 || lat > S * P + 3) begin
        failures++;
        $display("FAIL: press-to-pulse latency %0d cycles", lat);
      end
      In[0] = 1'b0;
      wait_cycles(4 * S * P);
      expect_pulses(0, 0, "release");
    end

    // Bouncy press of bit 1: high for 2 samples, low for 2, five times.
    for (int k = 0; k < 5; k++) begin
      In[1] = 1'b1; wait_cycles(2 * P);
      In[1] = 1'b0; wait_cycles(2 * P);
    end
    expect_pulses(1, 0, "bounce");
    In[1] = 1'b1;
    wait_cycles(4 * S * P);
    expect_pulses(1, 1, "settled after bounce");
    // Bouncy release: no pulses.
    for (int k = 0; k < 5; k++) begin
      In[1] = 1'b0; wait_cycles(2 * P);
      In[1] = 1'b1; wait_cycles(P);
    end
    In[1] = 1'b0;
    wait_cycles(4 * S * P);
    expect_pulses(1, 0, "bouncy release");

    // No Enable, no change.
    gate = 0;
    In = 2'b11;
    wait_cycles(8 * S * P);
    expect_pulses(0, 0, "Enable low");
    expect_pulses(1, 0, "Enable low");
    gate = 1;
    wait_cycles(4 * S * P);
    expect_pulses(0, 1, "Enable back");
    expect_pulses(1, 1, "Enable back");
    In = 2'b00;
    wait_cycles(4 * S * P);

    // Reset in the middle of a press restarts the filter.
    In[0] = 1'b1;
    wait_cycles((S - 1) * P);
    Reset = 1; wait_cycles(1); Reset = 0;
    wait_cycles((S - 2) * P);
    expect_pulses(0, 0, "reset restarts filter");
    wait_cycles(4 * S * P);
    expect_pulses(0, 1, "press after reset");
    In[0] = 1'b0;
    wait_cycles(4 * S * P);

    // Independent bits: bit 0 then bit 1.
    In[0] = 1'b1; wait_cycles(4 * S * P);
    expect_pulses(0, 1, "bit 0 alone");
    expect_pulses(1, 0, "bit 1 still");
    In[1] = 1'b1; wait_cycles(4 * S * P);
    expect_pulses(0, 0, "bit 0 held");
    expect_pulses(1, 1, "bit 1 alone");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
