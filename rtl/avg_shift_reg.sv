// avg_shift_reg: sample history of the moving-average filter.
//
// N registers of DATAW bits form a shift register. On a clock edge with en
// high the new sample enters taps[0] and every older sample moves one place
// (taps[i] <= taps[i-1]); taps[N-1] is the oldest sample in the window and
// is what a running sum subtracts. With en low nothing moves, so en works
// as a clock enable (the filter drives it with in_valid).
// rst is synchronous and active high and clears every register, so the
// window starts out as N zeros.
// Timing: taps change one edge after the sample is presented; no
// combinational path from din to any output.
// The shift structure and the enable follow the reference design; the
// synchronous, active-high reset is read from its register schematics.
module avg_shift_reg #(
  parameter int N     = 8,
  parameter int DATAW = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic signed [DATAW-1:0] din,
  output logic signed [DATAW-1:0] taps [N],
  output logic signed [DATAW-1:0] oldest
);

  logic signed [DATAW-1:0] shift_r [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) shift_r[i] <= '0;
    end else if (en) begin
      for (int i = N - 1; i > 0; i--) shift_r[i] <= shift_r[i-1];
      shift_r[0] <= din;
    end
  end

  assign taps   = shift_r;
  assign oldest = shift_r[N-1];

endmodule
