// tb_avg_scale: self-checking test of the divide-by-N scaler.
// Four instances cover the shift path (N = 8) and the divider path (N = 5),
// each truncating and rounding. The reference computes floor(s / N) and
// floor((s + N/2) / N) with integer arithmetic that handles negative sums
// explicitly. Sums are random over the full range plus the extremes.
module tb_avg_scale;
  localparam int DATAW = 16;
  localparam int SW8 = 19, SW5 = 19;
  logic signed [SW8-1:0] s8;
  logic signed [SW5-1:0] s5;
  logic signed [DATAW-1:0] a8t, a8r, a5t, a5r;
  int checks = 0, failures = 0;

  avg_scale #(.N(8), .DATAW(DATAW), .SUMW(SW8), .ROUND(1'b0)) u8t (.sum(s8), .avg(a8t));
  avg_scale #(.N(8), .DATAW(DATAW), .SUMW(SW8), .ROUND(1'b1)) u8r (.sum(s8), .avg(a8r));
  avg_scale #(.N(5), .DATAW(DATAW), .SUMW(SW5), .ROUND(1'b0)) u5t (.sum(s5), .avg(a5t));
  avg_scale #(.N(5), .DATAW(DATAW), .SUMW(SW5), .ROUND(1'b1)) u5r (.sum(s5), .avg(a5r));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int floordiv(int a, int n);
    int r = a % n;
    if (r < 0) r += n;
    return (a - r) / n;
  endfunction

  function automatic int clamp(int v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  task automatic chk(string tag, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("%s: sum8 %0d sum5 %0d got %0d want %0d", tag, s8, s5, got, want);
    end
  endtask

  initial begin
    int v8, v5;
    for (int t = 0; t < 2000; t++) begin
      case (t)
        0: begin v8 = 8 * 32767;  v5 = 5 * 32767;  end
        1: begin v8 = -8 * 32768; v5 = -5 * 32768; end
        2: begin v8 = 5;          v5 = 7;          end
        3: begin v8 = -5;         v5 = -7;         end
        4: begin v8 = 4;          v5 = -3;         end
        5: begin v8 = -4;         v5 = 2;          end
        default: begin
          v8 = $urandom_range(0, 8 * 65535) - 8 * 32768;
          v5 = $urandom_range(0, 5 * 65535) - 5 * 32768;
        end
      endcase
      s8 = SW8'(v8);
      s5 = SW5'(v5);
      #1;
      chk("N8 trunc", int'(a8t), clamp(floordiv(v8, 8)));
      chk("N8 round", int'(a8r), clamp(floordiv(v8 + 4, 8)));
      chk("N5 trunc", int'(a5t), clamp(floordiv(v5, 5)));
      chk("N5 round", int'(a5r), clamp(floordiv(v5 + 2, 5)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
