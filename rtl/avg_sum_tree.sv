// avg_sum_tree: sum of the N history taps through a balanced adder tree.
//
// Purely combinational. The taps (padded with zeros up to the next power of
// two) are added in pairs, the pair sums again in pairs, and so on for
// clog2(N) levels, so the critical path holds clog2(N) adders instead of
// the N-1 of a chain. Every node is SUMW bits wide; synthesis trims the
// upper bits of the early levels, which only need DATAW+1, DATAW+2, ...
// bits. SAT selects, as in avg_sum_chain, whether a node that leaves the
// SUMW-bit range wraps or saturates; with the default SUMW neither happens.
// Interface: taps[N] in, sum out, no clock.
// The tree shape follows the reference design; zero padding for a window
// that is not a power of two and uniform node width are this design's.
module avg_sum_tree #(
  parameter int N     = 8,
  parameter int DATAW = 16,
  parameter int SUMW  = DATAW + $clog2(N),
  parameter bit SAT   = 1'b0
) (
  input  logic signed [DATAW-1:0] taps [N],
  output logic signed [SUMW-1:0]  sum
);

  localparam int LEVELS = (N > 1) ? $clog2(N) : 1;
  localparam int NP     = 1 << LEVELS;

  longint node [NP];

  always_comb begin
    for (int i = 0; i < NP; i++) node[i] = (i < N) ? longint'(taps[i]) : 0;
    for (int l = 0; l < LEVELS; l++)
      for (int i = 0; i < (NP >> (l + 1)); i++)
        node[i] = avg_pkg::sat_add(node[2*i], node[2*i+1], SUMW, SAT);
    sum = SUMW'(node[0]);
  end

endmodule
