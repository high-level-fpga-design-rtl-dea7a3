// tb_avg_shift_reg: self-checking test of the sample-history shift register.
// Drives random samples with en toggling at random, keeps its own model of
// the last N accepted samples (zeros after reset) and compares every tap
// after every clock edge. Also checks that reset clears all taps.
module tb_avg_shift_reg;
  localparam int N = 8, DATAW = 16;
  logic clk = 1'b0, rst, en;
  logic signed [DATAW-1:0] din, taps [N], oldest;
  int checks = 0, failures = 0;
  logic signed [DATAW-1:0] model [N];

  avg_shift_reg #(.N(N), .DATAW(DATAW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int i = 0; i < N; i++) begin
      checks++;
      if (taps[i] !== model[i]) begin
        failures++;
        $display("tap %0d: got %0d want %0d", i, taps[i], model[i]);
      end
    end
    checks++;
    if (oldest !== model[N-1]) failures++;
  endtask

  initial begin
    rst = 1'b1; en = 1'b1; din = 16'sd77;
    for (int i = 0; i < N; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 compare();
    rst = 1'b0;
    for (int c = 0; c < 400; c++) begin
      en  = ($urandom_range(0, 3) != 0);
      din = DATAW'($urandom);
      @(posedge clk);
      if (en) begin
        for (int i = N - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = din;
      end
      #1 compare();
    end
    rst = 1'b1;
    @(posedge clk);
    for (int i = 0; i < N; i++) model[i] = '0;
    #1 compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
