// tb_avg_running_sum: self-checking test of the running-sum register.
// The testbench keeps its own window of the last N accepted samples, feeds
// the oldest one to the block as a history store would, and after every
// edge compares the block's sum with the sum of its window, recomputed from
// scratch. en toggles at random; extreme samples exercise the full width.
module tb_avg_running_sum;
  localparam int N = 8, DATAW = 16, SUMW = 19;
  logic clk = 1'b0, rst, en;
  logic signed [DATAW-1:0] din, oldest;
  logic signed [SUMW-1:0]  sum;
  int checks = 0, failures = 0;
  int win [N];

  avg_running_sum #(.DATAW(DATAW), .SUMW(SUMW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int win_sum();
    int s = 0;
    foreach (win[i]) s += win[i];
    return s;
  endfunction

  initial begin
    rst = 1'b1; en = 1'b0; din = '0;
    foreach (win[i]) win[i] = 0;
    oldest = '0;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    for (int c = 0; c < 600; c++) begin
      en = ($urandom_range(0, 4) != 0);
      case ($urandom_range(0, 5))
        0: din = 16'sh7fff;
        1: din = -16'sh8000;
        default: din = DATAW'($urandom);
      endcase
      oldest = DATAW'(win[N-1]);
      @(posedge clk);
      if (en) begin
        for (int i = N - 1; i > 0; i--) win[i] = win[i-1];
        win[0] = int'(din);
      end
      #1;
      checks++;
      if (int'(sum) != win_sum()) begin
        failures++;
        $display("cycle %0d: sum %0d want %0d", c, sum, win_sum());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
