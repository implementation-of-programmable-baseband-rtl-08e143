// Self-checking test of the 1/x accelerator: random divisors with random
// output back-pressure, results compared with floor(2^31 / x); checks the
// 32-cycle latency and that a burst of 64 operands without back-pressure comes
// out one result per cycle; in_last must arrive with the last result.
module tb_recip;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_ready, in_last = 0, out_valid, out_ready = 1, out_last;
  logic [31:0] in_data = 0, out_data;
  recip dut (.*);

  logic [31:0] expq [$];
  logic        expl [$];
  int got_n = 0;
  bit bp = 0;

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      expq.push_back(in_data[15:0] == 0 ? 32'hffff_ffff : 32'((64'd1 << 31) / in_data[15:0]));
      expl.push_back(in_last);
    end
    if (out_valid && out_ready) begin
      logic [31:0] e; logic el;
      e = expq.pop_front(); el = expl.pop_front();
      checks++; got_n++;
      if (out_data !== e || out_last !== el) begin
        failures++; $display("FAIL recip got %h/%b expected %h/%b", out_data, out_last, e, el);
      end
    end
  end
  always @(negedge clk) out_ready = bp ? ($urandom_range(0, 3) != 0) : 1'b1;

  initial begin
    int t0, t1;
    repeat (2) @(posedge clk); rst_n = 1;
    // latency
    @(negedge clk); in_valid = 1; in_data = 7;
    // operand taken at this edge; its result is valid 31 edges later (32 stages)
    @(posedge clk); t0 = $time / 10; @(negedge clk); in_valid = 0;
    wait (out_valid); t1 = $time / 10;
    checks++; if (t1 - t0 != 31) begin failures++; $display("FAIL latency %0d", t1 - t0); end
    @(negedge clk);
    // throughput burst
    t0 = $time / 10;
    for (int i = 0; i < 64; i++) begin
      in_valid = 1; in_data = 32'(i + 1); in_last = (i == 63);
      @(negedge clk);
    end
    in_valid = 0; in_last = 0;
    wait (got_n == 65); t1 = $time / 10;
    // 64 results, the last one 31 edges after the last operand: one per cycle
    checks++; if (expq.size() != 0 || t1 - t0 > 64 + 32) begin failures++; $display("FAIL burst took %0d", t1 - t0); end
    // random with back-pressure
    bp = 1;
    for (int i = 0; i < 300; i++) begin
      in_valid = 1; in_data = {16'hdead, 16'($urandom)}; in_last = ($urandom_range(0, 9) == 0);
      if (i < 3) in_data[15:0] = 16'(i);
      @(posedge clk); while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 0;
    wait (got_n == 365);
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
