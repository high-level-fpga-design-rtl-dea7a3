// avg_scale: divides the window sum by N to give the average.
//
// For a power-of-two N the division is an arithmetic right shift by
// clog2(N) bits (no divider). For any other N a constant integer divider
// is built; it rounds towards minus infinity like the shift does, so both
// paths give floor(sum / N).
// ROUND = 0 truncates (floor). ROUND = 1 adds N/2 before dividing, i.e.
// rounds to nearest with halves rounded up.
// The quotient is finally saturated to DATAW bits. With the default sum
// width it always fits; the clamp matters only for a narrowed, saturating
// sum.
// Interface: combinational, sum in, avg out.
// The shift for power-of-two N follows the reference design; the divider,
// rounding and clamp are its optional extensions, and the floor correction
// and the round-half-up rule are this design's choices.
module avg_scale #(
  parameter int N     = 8,
  parameter int DATAW = 16,
  parameter int SUMW  = DATAW + $clog2(N),
  parameter bit ROUND = 1'b0
) (
  input  logic signed [SUMW-1:0]  sum,
  output logic signed [DATAW-1:0] avg
);

  localparam int  SH   = (N > 1) ? $clog2(N) : 0;
  localparam int  WW   = SUMW + 2;
  localparam bit  POW2 = avg_pkg::is_pow2(N);
  localparam logic signed [WW-1:0] BIAS = ROUND ? WW'(N / 2) : '0;
  localparam logic signed [WW-1:0] DMAX = WW'((longint'(1) <<< (DATAW - 1)) - 1);
  localparam logic signed [WW-1:0] DMIN = -WW'(longint'(1) <<< (DATAW - 1));

  logic signed [WW-1:0] biased;
  logic signed [WW-1:0] quot;

  assign biased = WW'(sum) + BIAS;

  generate
    if (POW2) begin : g_shift
      assign quot = biased >>> SH;
    end else begin : g_div
      localparam logic signed [WW-1:0] DIV = WW'(N);
      logic signed [WW-1:0] q0;
      // Signed division truncates towards zero; step down by one for a
      // negative dividend that leaves a remainder, giving the floor.
      assign q0   = biased / DIV;
      assign quot = (biased < 0 && q0 * DIV != biased) ? q0 - 1'b1 : q0;
    end
  endgenerate

  always_comb begin
    if (quot > DMAX)      avg = DMAX[DATAW-1:0];
    else if (quot < DMIN) avg = DMIN[DATAW-1:0];
    else                  avg = quot[DATAW-1:0];
  end

endmodule
