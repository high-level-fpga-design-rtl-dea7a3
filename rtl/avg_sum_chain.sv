// avg_sum_chain: sum of the N history taps through a linear chain of adders.
//
// Purely combinational. The adders are cascaded in tap order,
// ((taps[0] + taps[1]) + taps[2]) + ..., which is the plain loop form of
// the sum; its critical path grows with N (N-1 adders in series).
// The sum is SUMW bits wide. With the default SUMW = DATAW + clog2(N) the
// sum can never overflow. A narrower SUMW may be chosen; every partial sum
// then either wraps (SAT = 0) or saturates at the SUMW-bit limits
// (SAT = 1), which is the saturating variant of the filter.
// Interface: taps[N] in, sum out, no clock.
// The chain and the sum width follow the reference design; the per-step
// saturation rule is this design's reading of its saturation option.
module avg_sum_chain #(
  parameter int N     = 8,
  parameter int DATAW = 16,
  parameter int SUMW  = DATAW + $clog2(N),
  parameter bit SAT   = 1'b0
) (
  input  logic signed [DATAW-1:0] taps [N],
  output logic signed [SUMW-1:0]  sum
);

  longint acc;

  always_comb begin
    acc = 0;
    for (int j = 0; j < N; j++)
      acc = avg_pkg::sat_add(acc, longint'(taps[j]), SUMW, SAT);
    sum = SUMW'(acc);
  end

endmodule
