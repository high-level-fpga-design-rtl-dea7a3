// tb_lab1_avg: end-to-end test of the moving-average filter.
//
// Seven filters run side by side on the same input stream:
//   chain, tree, running, ram : the four sum structures, N = 8, truncation
//   ram5r, tree5r             : N = 5 (integer divider), rounding on
//   chain_sat                 : 16-bit saturating sum in the adder chain
// A reference model keeps every sample accepted since reset and, for each
// accepted sample, computes floor((sum of the last N + bias) / N) (with
// per-step clamping for the saturating filter). Each output is checked
// exactly two cycles after its sample was accepted (latency 2), and
// out_valid must be low in every other cycle.
// Test phases: the constant-5 sequence with its known first outputs
// 0, 0, 1, 1, 2, 3, 3, 4, 5; an impulse; a constant; a ramp up and down;
// random samples with in_valid toggling; large values for saturation; a
// reset in the middle of the stream. Mechanisms counted (each must occur):
// back-to-back samples (II = 1), idle cycles between samples, circular
// buffer wrap, rounding differing from truncation, saturation of the sum.
module tb_lab1_avg;
  import avg_pkg::*;
  localparam int DATAW = 16;
  localparam int NF = 7;

  logic clk = 1'b0, rst, in_valid;
  logic signed [DATAW-1:0] in_data;
  logic                    ov [NF];
  logic signed [DATAW-1:0] od [NF];
  int checks = 0, failures = 0;

  // filter configurations: N, rounding, saturation
  localparam int FN  [NF] = '{8, 8, 8, 8, 5, 5, 8};
  localparam bit FRD [NF] = '{0, 0, 0, 0, 1, 1, 0};
  localparam bit FST [NF] = '{0, 0, 0, 0, 0, 0, 1};
  string fname [NF] = '{"chain", "tree", "running", "ram", "ram5r", "tree5r", "chain_sat"};

  lab1_avg #(.N(8), .ARCH(ARCH_CHAIN))   u0 (.clk, .rst, .in_valid, .in_data, .out_valid(ov[0]), .out_data(od[0]));
  lab1_avg #(.N(8), .ARCH(ARCH_TREE))    u1 (.clk, .rst, .in_valid, .in_data, .out_valid(ov[1]), .out_data(od[1]));
  lab1_avg #(.N(8), .ARCH(ARCH_RUNNING)) u2 (.clk, .rst, .in_valid, .in_data, .out_valid(ov[2]), .out_data(od[2]));
  lab1_avg #(.N(8), .ARCH(ARCH_RAM))     u3 (.clk, .rst, .in_valid, .in_data, .out_valid(ov[3]), .out_data(od[3]));
  lab1_avg #(.N(5), .ARCH(ARCH_RAM),  .ROUND(1'b1)) u4 (.clk, .rst, .in_valid, .in_data, .out_valid(ov[4]), .out_data(od[4]));
  lab1_avg #(.N(5), .ARCH(ARCH_TREE), .ROUND(1'b1)) u5 (.clk, .rst, .in_valid, .in_data, .out_valid(ov[5]), .out_data(od[5]));
  lab1_avg #(.N(8), .ARCH(ARCH_CHAIN), .SUMW(16), .SAT(1'b1)) u6 (.clk, .rst, .in_valid, .in_data, .out_valid(ov[6]), .out_data(od[6]));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  int hist [$];              // samples accepted since reset
  bit pend_v;                // a sample was accepted at the previous edge
  int pend_d [NF];           // its expected outputs
  int n_b2b = 0, n_gap = 0, n_wrap = 0, n_round = 0, n_sat = 0;
  bit prev_acc = 0;
  int const_seen = 0;
  int const_ref [9] = '{0, 0, 1, 1, 2, 3, 3, 4, 5};
  bit const_phase = 0;

  function automatic int floordiv(int a, int n);
    int r = a % n;
    if (r < 0) r += n;
    return (a - r) / n;
  endfunction

  function automatic int tap(int i);   // i-th newest sample, 0 if none
    return (hist.size() > i) ? hist[hist.size() - 1 - i] : 0;
  endfunction

  function automatic int expect_out(int f);
    int s = 0, q;
    for (int i = 0; i < FN[f]; i++) begin
      s += tap(i);
      if (FST[f]) begin
        if (s > 32767) begin s = 32767; n_sat++; end
        if (s < -32768) begin s = -32768; n_sat++; end
      end
    end
    q = floordiv(s + (FRD[f] ? FN[f] / 2 : 0), FN[f]);
    if (FRD[f] && q != floordiv(s, FN[f])) n_round++;
    if (q > 32767) q = 32767;
    if (q < -32768) q = -32768;
    return q;
  endfunction

  // drive one cycle and check what the edge produced
  task automatic step(bit v, int d);
    in_valid = v;
    in_data  = DATAW'(d);
    @(posedge clk);
    #1;
    // outputs now belong to the sample accepted at the previous edge,
    // unless this edge was a reset edge, which clears them
    if (rst) pend_v = 0;
    for (int f = 0; f < NF; f++) begin
      checks++;
      if (ov[f] !== pend_v) begin
        failures++;
        $display("%s: out_valid %0b want %0b", fname[f], ov[f], pend_v);
      end else if (pend_v && int'(od[f]) != pend_d[f]) begin
        failures++;
        $display("%s: out_data %0d want %0d", fname[f], od[f], pend_d[f]);
      end
    end
    if (pend_v && const_phase && const_seen < 9) begin
      checks++;
      if (int'(od[2]) != const_ref[const_seen]) begin
        failures++;
        $display("constant test: output %0d is %0d want %0d", const_seen, od[2], const_ref[const_seen]);
      end
      const_seen++;
    end
    // model of this edge
    if (rst) begin
      hist.delete();
      pend_v = 0;
      prev_acc = 0;
    end else begin
      pend_v = v;
      if (v) begin
        hist.push_back(d);
        if (hist.size() > 8 && (hist.size() % 8) == 1) n_wrap++;
        for (int f = 0; f < NF; f++) pend_d[f] = expect_out(f);
        if (prev_acc) n_b2b++;
      end else if (prev_acc) n_gap++;
      prev_acc = v;
    end
  endtask

  task automatic do_reset();
    rst = 1'b1;
    step(0, 0);
    step(0, 0);
    rst = 1'b0;
  endtask

  initial begin
    in_valid = 1'b0; in_data = '0;
    do_reset();
    // constant-5 sequence, one sample per cycle, after a leading 0
    const_phase = 1;
    step(1, 0);
    for (int i = 0; i < 12; i++) step(1, 5);
    step(0, 0);
    step(0, 0);
    const_phase = 0;
    checks++;
    if (const_seen != 9) failures++;
    // impulse, samples on every other cycle
    do_reset();
    for (int i = 0; i < 20; i++) begin
      step(1, (i == 1) ? 1000 : 0);
      step(0, 0);
    end
    // constant, then ramp up and down, back to back
    for (int i = 0; i < 16; i++) step(1, 300);
    for (int i = 0; i < 40; i++) step(1, (i < 20) ? i * 100 : (40 - i) * 100);
    // random values with random gaps, including negatives
    for (int i = 0; i < 600; i++)
      step($urandom_range(0, 2) != 0, int'($signed(DATAW'($urandom))));
    // large values: saturation of the narrow sum
    for (int i = 0; i < 30; i++) step(1, (i % 10 < 5) ? 30000 : -30000);
    // reset in the middle of a stream, then continue
    step(1, 1234);
    do_reset();
    for (int i = 0; i < 30; i++) step(1, -7 * i);
    step(0, 0);
    step(0, 0);

    $display("mechanisms: back_to_back=%0d gaps=%0d ram_wraps=%0d rounding=%0d saturation=%0d",
             n_b2b, n_gap, n_wrap, n_round, n_sat);
    checks += 5;
    if (n_b2b == 0)   failures++;
    if (n_gap == 0)   failures++;
    if (n_wrap == 0)  failures++;
    if (n_round == 0) failures++;
    if (n_sat == 0)   failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
