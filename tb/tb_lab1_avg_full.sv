// tb_lab1_avg_full: the filter at its default configuration (N = 8,
// DATAW = 16, running sum, truncation), no parameters overridden.
//
// Phase 1 repeats the basic bring-up stimulus: reset with in_valid high and
// in_data = 5, then reset released with the input held at 5. The outputs
// must step through 0, 1, 1, 2, 3, 3, 4 and settle at 5, one result per
// cycle, the first one two cycles after the first accepted sample.
// Phase 2 runs the three standard tests (impulse, constant, ramp) with
// in_valid toggling, then a random stream, all against a reference model
// of floor(sum of last 8 / 8) checked with the 2-cycle latency.
module tb_lab1_avg_full;
  localparam int DATAW = 16, N = 8;
  logic clk = 1'b0, rst, in_valid;
  logic signed [DATAW-1:0] in_data;
  logic                    out_valid;
  logic signed [DATAW-1:0] out_data;
  int checks = 0, failures = 0;

  lab1_avg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist [$];
  bit pend_v = 0;
  int pend_d;

  function automatic int floordiv(int a, int n);
    int r = a % n;
    if (r < 0) r += n;
    return (a - r) / n;
  endfunction

  task automatic step(bit v, int d);
    int s;
    in_valid = v;
    in_data  = DATAW'(d);
    @(posedge clk);
    #1;
    if (rst) pend_v = 0;
    checks++;
    if (out_valid !== pend_v) begin
      failures++; $display("out_valid %0b want %0b", out_valid, pend_v);
    end else if (pend_v && int'(out_data) != pend_d) begin
      failures++; $display("out_data %0d want %0d", out_data, pend_d);
    end
    if (rst) hist.delete();
    else begin
      pend_v = v;
      if (v) begin
        hist.push_back(d);
        s = 0;
        for (int i = 0; i < N; i++)
          if (hist.size() > i) s += hist[hist.size() - 1 - i];
        pend_d = floordiv(s, N);
      end
    end
  endtask

  initial begin
    int seq [9] = '{0, 1, 1, 2, 3, 3, 4, 5, 5};
    // phase 1: reset held with valid input, then constant 5
    rst = 1'b1;
    step(1, 5);
    rst = 1'b0;
    step(1, 5);          // first accepted sample
    step(1, 5);          // its result is registered at this edge
    for (int k = 0; k < 12; k++) begin
      checks++;
      if (!out_valid || int'(out_data) != ((k < 9) ? seq[k] : 5)) begin
        failures++;
        $display("constant 5: result %0d is %0d", k, out_data);
      end
      step(1, 5);
    end
    // phase 2: impulse, constant, ramp with toggling in_valid, then random
    rst = 1'b1;
    step(0, 0);
    rst = 1'b0;
    for (int i = 0; i < 24; i++) begin step(1, (i == 2) ? 800 : 0); step(0, 0); end
    for (int i = 0; i < 24; i++) begin step(1, 400); step(0, 0); end
    for (int i = 0; i < 24; i++) begin step(1, i * 50); step(0, 0); end
    for (int i = 0; i < 500; i++)
      step($urandom_range(0, 1) == 1, int'($signed(DATAW'($urandom))));
    step(0, 0);
    step(0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
