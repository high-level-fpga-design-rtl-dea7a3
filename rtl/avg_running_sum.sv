// avg_running_sum: registered running sum of the last N samples.
//
// Instead of adding all N samples each cycle, the sum register is updated
// on every accepted sample by one addition and one subtraction:
//   sum <= sum + din - oldest
// where oldest is the sample leaving the window (the last tap of the shift
// register, or the RAM word under the pointer of the circular buffer).
// Starting from zero after reset with a history of zeros, sum always equals
// the sum of the N newest samples, and never overflows with the default
// SUMW = DATAW + clog2(N).
// Interface: en (= in_valid) acts as clock enable; rst is synchronous,
// active high. Timing: sum holds the new window one edge after din is
// accepted, the same edge at which the history advances.
// The update rule and width follow the reference design; clearing the sum
// together with the history is this design's choice.
module avg_running_sum #(
  parameter int DATAW = 16,
  parameter int SUMW  = DATAW + 3
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic signed [DATAW-1:0] din,
  input  logic signed [DATAW-1:0] oldest,
  output logic signed [SUMW-1:0]  sum
);

  always_ff @(posedge clk) begin
    if (rst)     sum <= '0;
    else if (en) sum <= sum + SUMW'(din) - SUMW'(oldest);
  end

endmodule
