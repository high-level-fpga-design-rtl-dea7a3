// lab1_avg: streaming moving-average filter, y[n] = (1/N) * sum x[n-i],
// i = 0..N-1, on signed DATAW-bit samples.
//
// Structure: a sample history (shift register or RAM circular buffer), a
// sum unit, a scaler that divides by N, and a registered output. ARCH
// picks one of four sum structures (see avg_pkg::arch_e); all four give
// the same output stream cycle for cycle:
//   ARCH_CHAIN   shift register + combinational adder chain
//   ARCH_TREE    shift register + combinational adder tree
//   ARCH_RUNNING shift register + registered running sum (default)
//   ARCH_RAM     RAM circular buffer + registered running sum
// Interface: in_valid/in_data is a sample stream with no back-pressure;
// in_valid is the clock enable of the history and the running sum.
// out_valid is high for one cycle per accepted sample, with out_data the
// average of the window that ends at that sample.
// Timing: latency 2 cycles from the cycle a sample is accepted to the cycle
// its result is valid; initiation interval 1 (a sample every cycle).
// Cycle k: sample accepted. Edge k: history (and running sum) updated.
// Cycle k+1: sum and scaler settle. Edge k+1: out_data/out_valid
// registered, visible in cycle k+2.
// rst is synchronous and active high; it clears the history, the sum,
// the valid pipeline and out_data, so the first N-1 results average in
// zeros.
// The names, N = 8, DATAW = 16, the sum width DATAW + clog2(N), the four
// structures and the 2-cycle latency follow the lab this filter comes from.
// ROUND (default off: truncation) and SAT/SUMW (saturating narrower sum in
// the chain and tree) are its optional extensions.
module lab1_avg #(
  parameter int             N     = 8,
  parameter int             DATAW = 16,
  parameter avg_pkg::arch_e ARCH  = avg_pkg::ARCH_RUNNING,
  parameter bit             ROUND = 1'b0,
  parameter bit             SAT   = 1'b0,
  parameter int             SUMW  = DATAW + $clog2(N)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [DATAW-1:0] in_data,
  output logic                    out_valid,
  output logic signed [DATAW-1:0] out_data
);

  import avg_pkg::*;

  logic signed [SUMW-1:0]  sum;
  logic signed [DATAW-1:0] avg;
  logic                    acc_q;   // a sample was accepted last cycle

  generate
    if (ARCH == ARCH_RAM) begin : g_ram
      logic signed [DATAW-1:0] oldest;
      avg_circ_buffer #(.N(N), .DATAW(DATAW)) u_hist (
        .clk, .rst, .en(in_valid), .din(in_data), .oldest(oldest)
      );
      avg_running_sum #(.DATAW(DATAW), .SUMW(SUMW)) u_sum (
        .clk, .rst, .en(in_valid), .din(in_data), .oldest(oldest), .sum(sum)
      );
    end else begin : g_sr
      logic signed [DATAW-1:0] taps [N];
      logic signed [DATAW-1:0] oldest;
      avg_shift_reg #(.N(N), .DATAW(DATAW)) u_hist (
        .clk, .rst, .en(in_valid), .din(in_data), .taps(taps), .oldest(oldest)
      );
      if (ARCH == ARCH_CHAIN) begin : g_chain
        avg_sum_chain #(.N(N), .DATAW(DATAW), .SUMW(SUMW), .SAT(SAT)) u_sum (
          .taps(taps), .sum(sum)
        );
      end else if (ARCH == ARCH_TREE) begin : g_tree
        avg_sum_tree #(.N(N), .DATAW(DATAW), .SUMW(SUMW), .SAT(SAT)) u_sum (
          .taps(taps), .sum(sum)
        );
      end else begin : g_running
        avg_running_sum #(.DATAW(DATAW), .SUMW(SUMW)) u_sum (
          .clk, .rst, .en(in_valid), .din(in_data), .oldest(oldest), .sum(sum)
        );
      end
    end
  endgenerate

  avg_scale #(.N(N), .DATAW(DATAW), .SUMW(SUMW), .ROUND(ROUND)) u_scale (
    .sum(sum), .avg(avg)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_q     <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      acc_q     <= in_valid;
      out_valid <= acc_q;
      if (acc_q) out_data <= avg;
    end
  end

  // Fixed latency: every accepted sample yields a valid result two cycles on.
  a_latency: assert property (@(posedge clk) disable iff (rst)
                              in_valid |=> ##1 out_valid)
    else $error("out_valid missing two cycles after an accepted sample");

endmodule
