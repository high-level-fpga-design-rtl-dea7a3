// avg_circ_buffer: sample history kept in a RAM used as a circular buffer.
//
// An N-word RAM and a pointer replace the shift register. The pointer
// addresses the oldest sample of the window; on an accepted sample (en)
// that word is overwritten with the new sample and the pointer advances by
// one, wrapping from N-1 to 0. Only one word moves per sample, which is
// what lets large N map onto memory instead of flip-flops.
// The RAM itself has no reset. Until the pointer has wrapped once after
// reset (flag full), the word under the pointer has never been written and
// oldest reads as zero, which gives the same all-zero start as a cleared
// shift register.
// Interface: oldest is read combinationally from the RAM at the pointer
// (asynchronous read, as a distributed RAM); the write and the pointer
// update happen on the clock edge with en high. rst is synchronous,
// active high, and clears the pointer and the full flag.
// The RAM-and-pointer update follows the reference design; the full flag,
// the explicit wrap for any N and the asynchronous read are this design's.
module avg_circ_buffer #(
  parameter int N     = 8,
  parameter int DATAW = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic signed [DATAW-1:0] din,
  output logic signed [DATAW-1:0] oldest
);

  localparam int PW = (N > 1) ? $clog2(N) : 1;

  logic signed [DATAW-1:0] ram [N];
  logic [PW-1:0]           ptr;
  logic                    full;
  logic                    wrap;

  assign wrap   = (ptr == PW'(N - 1));
  assign oldest = full ? ram[ptr] : '0;

  always_ff @(posedge clk) begin
    if (en) ram[ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr  <= '0;
      full <= 1'b0;
    end else if (en) begin
      ptr <= wrap ? '0 : ptr + 1'b1;
      if (wrap) full <= 1'b1;
    end
  end

  // The pointer never leaves the RAM.
  a_ptr_range: assert property (@(posedge clk) disable iff (rst) int'(ptr) < N)
    else $error("circular buffer pointer out of range");

endmodule
