// Self-checking test of the FIR filter: random Q1.15 coefficients loaded over
// the configuration port, random samples in complex mode and in dual real mode,
// outputs compared with a direct convolution (rounded, saturated) computed
// here; one sample per cycle with a one-cycle latency.
module tb_fir_filter;
  localparam int TAPS = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we = 0; logic [3:0] cfg_addr = 0; logic [31:0] cfg_data = 0;
  logic in_valid = 0, in_ready, in_last = 0, out_valid, out_ready = 1, out_last;
  logic [31:0] in_data = 0, out_data;
  fir_filter #(.TAPS(TAPS)) dut (.*);

  int cr [TAPS], ci [TAPS];
  int xr [$], xi [$];
  bit dual = 0;

  function automatic int sat(longint v);
    v = (v + 16384) >>> 15;
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  task automatic cfg(input int a, input logic [31:0] d);
    cfg_we = 1; cfg_addr = 4'(a); cfg_data = d;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic run(input int n);
    for (int t = 0; t < n; t++) begin
      longint ar, ai;
      int r, i;
      r = $signed($urandom_range(0, 20000)) - 10000;
      i = $signed($urandom_range(0, 20000)) - 10000;
      xr.push_front(r); xi.push_front(i);
      in_valid = 1; in_data = {16'(i), 16'(r)};
      @(posedge clk); #1;
      ar = 0; ai = 0;
      for (int k = 0; k < TAPS && k < xr.size(); k++) begin
        if (dual) begin
          ar += longint'(cr[k]) * xr[k];
          ai += longint'(ci[k]) * xi[k];
        end else begin
          ar += longint'(cr[k]) * xr[k] - longint'(ci[k]) * xi[k];
          ai += longint'(cr[k]) * xi[k] + longint'(ci[k]) * xr[k];
        end
      end
      checks++;
      if (!out_valid || $signed(out_data[15:0]) != sat(ar) || $signed(out_data[31:16]) != sat(ai)) begin
        failures++;
        $display("FAIL t=%0d got %0d,%0d expected %0d,%0d", t, $signed(out_data[15:0]),
                 $signed(out_data[31:16]), sat(ar), sat(ai));
      end
      @(negedge clk);
    end
    in_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < TAPS; k++) begin
      cr[k] = $signed($urandom_range(0, 8000)) - 4000;
      ci[k] = $signed($urandom_range(0, 8000)) - 4000;
    end
    cfg(0, 0); cfg(1, 0);
    for (int k = 0; k < TAPS; k++) cfg(2, {16'(ci[k]), 16'(cr[k])});
    // prime the delay line with zeros so that the model starts from rest
    for (int k = 0; k < TAPS; k++) begin
      in_valid = 1; in_data = 0; @(negedge clk);
    end
    for (int k = 0; k < TAPS; k++) begin xr.push_front(0); xi.push_front(0); end
    run(100);
    dual = 1; cfg(0, 1);
    run(100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
