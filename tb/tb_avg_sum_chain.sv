// tb_avg_sum_chain: self-checking test of the adder-chain sum.
// Two instances: the default full-width sum, checked against a wide integer
// sum, and a 16-bit saturating chain (SUMW = DATAW, SAT = 1), checked
// against a reference that clamps every partial sum in tap order.
// Random taps plus all-maximum and all-minimum corner vectors.
module tb_avg_sum_chain;
  localparam int N = 8, DATAW = 16;
  logic signed [DATAW-1:0] taps [N];
  logic signed [DATAW+2:0] sum_full;
  logic signed [DATAW-1:0] sum_sat;
  int checks = 0, failures = 0;
  int sat_hits = 0;

  avg_sum_chain #(.N(N), .DATAW(DATAW)) dut_full (.taps(taps), .sum(sum_full));
  avg_sum_chain #(.N(N), .DATAW(DATAW), .SUMW(DATAW), .SAT(1'b1)) dut_sat (
    .taps(taps), .sum(sum_sat));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_vec();
    int ref_full, ref_sat;
    bit clamped;
    ref_full = 0; ref_sat = 0; clamped = 0;
    for (int j = 0; j < N; j++) begin
      ref_full += int'(taps[j]);
      ref_sat  += int'(taps[j]);
      if (ref_sat > 32767)  begin ref_sat = 32767;  clamped = 1; end
      if (ref_sat < -32768) begin ref_sat = -32768; clamped = 1; end
    end
    if (clamped) sat_hits++;
    #1;
    checks += 2;
    if (int'(sum_full) != ref_full) begin
      failures++; $display("full: got %0d want %0d", sum_full, ref_full);
    end
    if (int'(sum_sat) != ref_sat) begin
      failures++; $display("sat: got %0d want %0d", sum_sat, ref_sat);
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
