// tb_avg_circ_buffer: self-checking test of the RAM circular buffer.
// Two instances, N = 8 (pointer wraps naturally) and N = 5 (explicit wrap),
// fed the same random stream with en toggling. Before each edge the oldest
// output must equal the sample accepted N samples earlier, or zero while
// fewer than N samples have been accepted since reset. A mid-run reset
// checks that the buffer restarts empty.
module tb_avg_circ_buffer;
  localparam int DATAW = 16;
  logic clk = 1'b0, rst, en;
  logic signed [DATAW-1:0] din, old8, old5;
  int checks = 0, failures = 0;
  int hist [$];

  avg_circ_buffer #(.N(8), .DATAW(DATAW)) dut8 (.clk, .rst, .en, .din, .oldest(old8));
  avg_circ_buffer #(.N(5), .DATAW(DATAW)) dut5 (.clk, .rst, .en, .din, .oldest(old5));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_old(int n);
    if (hist.size() < n) return 0;
    return hist[hist.size() - n];
  endfunction

  task automatic run(int cycles);
    for (int c = 0; c < cycles; c++) begin
      en  = ($urandom_range(0, 3) != 0);
      din = DATAW'($urandom);
      #1;
      checks += 2;
      if (int'(old8) != expect_old(8)) begin
        failures++; $display("N=8: got %0d want %0d", old8, expect_old(8));
      end
      if (int'(old5) != expect_old(5)) begin
        failures++; $display("N=5: got %0d want %0d", old5, expect_old(5));
      end
      @(posedge clk);
      if (en) hist.push_back(int'(din));
      #1;
    end
  endtask

  initial begin
    rst = 1'b1; en = 1'b0; din = '0;
    repeat (2) @(posedge clk);
    #2 rst = 1'b0;
    run(300);
    #2 rst = 1'b1;
    @(posedge clk);
    #2 rst = 1'b0;
    hist.delete();
    run(100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
