// Debouncer: turns a group of noisy push-button inputs into clean one-cycle
// pulses, one per press.
//
// Each bit of In is synchronised to Clock with two flip-flops and then
// sampled on the cycles Enable is high (Enable is a slow sampling tick, so
// the filter spans a human time scale without a wide counter per bit). A bit's
// debounced level changes only after STABLE_SAMPLES consecutive samples that
// differ from it; any sample equal to the current level restarts the count,
// so bouncing never gets through. On the cycle a level rises from 0 to 1, the
// bit's Out pulses high for exactly one Clock cycle. Releases make no pulse.
//
// Interface: Clock, Reset (synchronous, clears levels, counts and Out),
// Enable, In[WIDTH-1:0], Out[WIDTH-1:0].
// An assertion checks that each pulse is one cycle wide.
// Timing: a press shows on Out one cycle after the STABLE_SAMPLES-th Enable
// tick that sees the pressed input (plus two cycles of synchronisation).
//
// Follows the lab text: the port list, WIDTH-wide groups of buttons and the
// clean one-cycle pulse. How the filtering is done, and STABLE_SAMPLES, are
// this design's own.
module Debouncer #(
  parameter int unsigned WIDTH          = 1,
  parameter int unsigned STABLE_SAMPLES = 8
) (
  input  logic             Clock,
  input  logic             Reset,
  input  logic             Enable,
  input  logic [WIDTH-1:0] In,
  output logic [WIDTH-1:0] Out
);

  localparam int unsigned CNT_W = $clog2(STABLE_SAMPLES + 1);

  logic [WIDTH-1:0] sync1, sync2;
  logic [WIDTH-1:0] level;
  logic [CNT_W-1:0] count [WIDTH];

  always_ff @(posedge Clock) begin
    sync1 <= In;
    sync2 <= sync1;
  end

  always_ff @(posedge Clock) begin
    if (Reset) begin
      level <= '0;
      Out   <= '0;
      for (int i = 0; i < WIDTH; i++) count[i] <= '0;
    end else begin
      Out <= '0;
      if (Enable) begin
        for (int i = 0; i < WIDTH; i++) begin
          if (sync2[i] == level[i]) begin
            count[i] <= '0;
          end else if (count[i] == CNT_W'(STABLE_SAMPLES - 1)) begin
            count[i] <= '0;
            level[i] <= sync2[i];
            Out[i]   <= sync2[i];
          end else begin
            count[i] <= count[i] + 1'b1;
          end
        end
      end
    end
  end

  // Every output pulse is exactly one cycle wide.
  for (genvar g = 0; g < WIDTH; g++) begin : g_check
    a_single_cycle: assert property (@(posedge Clock) disable iff (Reset) Out[g] |=> !Out[g]);
  end

endmodule
