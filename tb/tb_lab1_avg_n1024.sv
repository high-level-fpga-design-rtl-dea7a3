// tb_lab1_avg_n1024: the filter with a 1024-sample window, the large size
// used to compare how the history maps onto flip-flops or memory.
// Four filters (chain, tree, running sum over a shift register, running sum
// over the RAM circular buffer) take the same 3000-sample stream with
// random gaps; each result is checked two cycles after its sample against
// floor(sum of the last 1024 samples / 1024), recomputed from scratch.
module tb_lab1_avg_n1024;
  import avg_pkg::*;
  localparam int N = 1024, DATAW = 16, NF = 4;
  logic clk = 1'b0, rst, in_valid;
  logic signed [DATAW-1:0] in_data;
  logic                    ov [NF];
  logic signed [DATAW-1:0] od [NF];
  int checks = 0, failures = 0;

  lab1_avg #(.N(N), .ARCH(ARCH_CHAIN))   u0 (.clk, .rst, .in_valid, .in_data, .out_valid(ov[0]), .out_data(od[0]));
  lab1_avg #(.N(N), .ARCH(ARCH_TREE))    u1 (.clk, .rst, .in_valid, .in_data, .out_valid(ov[1]), .out_data(od[1]));
  lab1_avg #(.N(N), .ARCH(ARCH_RUNNING)) u2 (.clk, .rst, .in_valid, .in_data, .out_valid(ov[2]), .out_data(od[2]));
  lab1_avg #(.N(N), .ARCH(ARCH_RAM))     u3 (.clk, .rst, .in_valid, .in_data, .out_valid(ov[3]), .out_data(od[3]));

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
    for (int f = 0; f < NF; f++) begin
      checks++;
      if (ov[f] !== pend_v || (pend_v && int'(od[f]) != pend_d)) begin
        failures++;
        $display("filter %0d: valid %0b data %0d, want %0b %0d", f, ov[f], od[f], pend_v, pend_d);
      end
    end
    if (rst) hist.delete();
    else begin
      pend_v = v;
      if (v) begin
        hist.push_back(d);
        if (hist.size() > N) void'(hist.pop_front());
        s = 0;
        foreach (hist[i]) s += hist[i];
        pend_d = floordiv(s, N);
      end
    end
  endtask

  initial begin
    rst = 1'b1;
    step(0, 0);
    rst = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      int d;
      d = (i < 1500) ? int'($urandom_range(0, 30000)) : int'($signed(DATAW'($urandom)));
      step($urandom_range(0, 4) != 0, d);
    end
    step(0, 0);
    step(0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
