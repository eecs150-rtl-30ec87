// RotaryEncoder_tb: self-checking test of the quadrature decoder.
//
// Moves {A,B} through Gray-code steps and checks, on every cycle, that a
// forward step (00->01->11->10->00) gives exactly one Up pulse and a reverse
// step exactly one Down pulse, three clock cycles after the input change and
// one cycle long; that a two-bit jump and an unchanged input give no pulse;
// and that back-and-forth contact bounce gives matching Up/Down pairs.
`timescale 1ns/1ps
module RotaryEncoder_tb;
  logic Clock = 1'b0;
  logic Reset, A, B, Up, Down;

  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_jump = 0;

  RotaryEncoder dut (.*);

  always #5 Clock = ~Clock;

  initial begin
    repeat (20000) @(posedge Clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Position in the forward sequence of each code.
  function automatic int pos(logic [1:0] c);
    case (c)
      2'b00: return 0;
      2'b01: return 1;
      2'b11: return 2;
      default: return 3;
    endcase
  endfunction

  logic [1:0] cur;

  // Drive a new code and watch the next `hold` cycles.
  task automatic move_to(logic [1:0] code, int hold);
    int d;
    bit exp_up, exp_down;
    d = (pos(code) - pos(cur) + 4) % 4;
    exp_up   = (d == 1);
    exp_down = (d == 3);
    if (exp_up) n_up++;
    if (exp_down) n_down++;
    if (d == 2) n_jump++;
    {A, B} = code;
    cur = code;
    for (int i = 1; i <= hold; i++) begin
      @(posedge Clock); #1;
      checks++;
      if (Up !== (exp_up && i == 3) || Down !== (exp_down && i == 3)) begin
        failures++;
        $display("FAIL: code %b cycle %0d Up=%0b Down=%0b expected %0b %0b",
                 code, i, Up, Down, exp_up && i == 3, exp_down && i == 3);
      end
    end
  endtask

  localparam logic [1:0] FWD [4] = '{2'b01, 2'b11, 2'b10, 2'b00};
  localparam logic [1:0] REV [4] = '{2'b10, 2'b11, 2'b01, 2'b00};

  initial begin
    {A, B} = 2'b00;
    cur = 2'b00;
    Reset = 1;
    repeat (4) @(posedge Clock);
    #1;
    Reset = 0;
    checks++;
    if (Up || Down) begin
      failures++;
      $display("FAIL: pulse during reset");
    end

    // Three detents forward, then three back.
    for (int k = 0; k < 12; k++) move_to(FWD[k % 4], 6);
    for (int k = 0; k < 12; k++) move_to(REV[k % 4], 6);
    // Two-bit jumps carry no direction.
    move_to(2'b11, 6);
    move_to(2'b00, 6);
    // Bounce on one contact: forward, back, forward.
    move_to(2'b01, 5);
    move_to(2'b00, 5);
    move_to(2'b01, 5);
    // Random walk.
    for (int k = 0; k < 1500; k++) move_to(2'($urandom), $urandom_range(4, 8));

    checks++;
    if (n_up == 0 || n_down == 0 || n_jump == 0) begin
      failures++;
      $display("FAIL: not every kind of step was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
