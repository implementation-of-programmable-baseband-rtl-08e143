// Self-checking test of the magnitude approximation: exact value of the
// max + 3/8 min rule for random and corner inputs, and its error against the
// true magnitude stays below 7 %.
module tb_abs_approx;
  int checks = 0, failures = 0;
  logic signed [15:0] re, im;
  logic [16:0] mag;
  abs_approx #(.N(16)) dut (.*);

  task automatic one(input int r, input int i);
    int ar, ai, mx, mn, exp_v;
    real truth;
    re = 16'(r); im = 16'(i); #1;
    ar = (r < 0) ? -r : r; ai = (i < 0) ? -i : i;
    mx = (ar > ai) ? ar : ai; mn = (ar > ai) ? ai : ar;
    exp_v = mx + mn / 4 + mn / 8;
    checks++;
    if (int'(mag) != exp_v) begin
      failures++; $display("FAIL abs(%0d,%0d) = %0d expected %0d", r, i, mag, exp_v);
    end
    truth = $sqrt(real'(r) * r + real'(i) * i);
    if (truth > 100.0) begin
      checks++;
      if (real'(mag) > 1.07 * truth || real'(mag) < 0.93 * truth) begin
        failures++; $display("FAIL abs(%0d,%0d) = %0d far from %f", r, i, mag, truth);
      end
    end
  endtask

  initial begin
    one(0, 0); one(-32768, -32768); one(32767, 0); one(0, -32768); one(3000, 4000);
    for (int t = 0; t < 1000; t++) one($signed(16'($urandom)), $signed(16'($urandom)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
