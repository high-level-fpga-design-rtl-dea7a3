// tb_avg_sum_tree: self-checking test of the adder-tree sum.
// Two instances: the default full-width sum, checked against a wide integer
// sum, and a 16-bit saturating chain (SUMW = DATAW, SAT = 1), checked
// against a reference that clamps every partial sum in tree order (pairs, then pairs of pairs).
// Random taps plus all-maximum and all-minimum corner vectors.
module tb_avg_sum_tree;
  localparam int N = 8, DATAW = 16;
  logic signed [DATAW-1:0] taps [N];
  logic signed [DATAW+2:0] sum_full;
  logic signed [DATAW-1:0] sum_sat;
  int checks = 0, failures = 0;
  int sat_hits = 0;

  avg_sum_tree #(.N(N), .DATAW(DATAW)) dut_full (.taps(taps), .sum(sum_full));
  avg_sum_tree #(.N(N), .DATAW(DATAW), .SUMW(DATAW), .SAT(1'b1)) dut_sat (
    .taps(taps), .sum(sum_sat));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clamp16(int v, ref bit clamped);
    if (v > 32767)  begin clamped = 1; return 32767;  end
    if (v < -32768) begin clamped = 1; return -32768; end
    return v;
  endfunction

  task automatic check_vec();
    int ref_full;
    int lvl [N];
    bit clamped;
    ref_full = 0; clamped = 0;
    for (int j = 0; j < N; j++) begin
      ref_full += int'(taps[j]);
      lvl[j] = int'(taps[j]);
    end
    for (int w = N / 2; w >= 1; w = w / 2)
      for (int i = 0; i < w; i++) lvl[i] = clamp16(lvl[2*i] + lvl[2*i+1], clamped);
    if (clamped) sat_hits++;
    #1;
    checks += 2;
    if (int'(sum_full) != ref_full) begin
      failures++; $display("full: got %0d want %0d", sum_full, ref_full);
    end
    if (int'(sum_sat) != lvl[0]) begin
      failures++; $display("sat: got %0d want %0d", sum_sat, lvl[0]);
    end
  endtask

  initial begin
    for (int j = 0; j < N; j++) taps[j] = 16'sh7fff;
    check_vec();
    for (int j = 0; j < N; j++) taps[j] = -16'sh8000;
    check_vec();
    for (int t = 0; t < 500; t++) begin
      for (int j = 0; j < N; j++) taps[j] = DATAW'($urandom);
      check_vec();
    end
    checks++;
    if (sat_hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
