// Self-checking test of the Viterbi decoder: random information bits plus six
// zero tail bits are encoded here with the 133/171 (octal) code, a few
// well-separated channel bits are flipped, and the decoded block (tail
// included) must equal the information sent. Three blocks of different lengths
// run back to back, with random output back-pressure.
module tb_viterbi;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we = 0; logic [3:0] cfg_addr = 0; logic [31:0] cfg_data = 0;
  logic in_valid = 0, in_ready, in_last = 0, out_valid, out_ready = 1, out_last;
  logic [31:0] in_data = 0, out_data;
  viterbi #(.MAXLEN(256)) dut (.*);

  bit bp = 0;
  always @(posedge clk) #2 out_ready = bp ? ($urandom_range(0, 2) != 0) : 1'b1;

  logic info [$];
  logic got  [$];
  int   got_last = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    got.push_back(out_data[0]);
    if (out_last) got_last++;
  end

  task automatic block(input int n, input int nerr);
    logic [5:0] sr;
    logic [1:0] code [$];
    sr = 0;
    info.delete(); got.delete(); got_last = 0;
    for (int t = 0; t < n + 6; t++) begin
      logic b; logic [6:0] r;
      b = (t < n) ? 1'($urandom_range(0, 1)) : 1'b0;
      info.push_back(b);
      r = {b, sr};
      code.push_back({r[6] ^ r[5] ^ r[4] ^ r[3] ^ r[0], r[6] ^ r[4] ^ r[3] ^ r[1] ^ r[0]});
      sr = r[6:1];
    end
    // flip one bit in each of nerr windows of 20 steps
    for (int e = 0; e < nerr; e++) begin
      int p = e * 20 + $urandom_range(0, 9);
      if (p < code.size()) code[p][$urandom_range(0, 1)] ^= 1'b1;
    end
    foreach (code[t]) begin
      in_valid = 1; in_data = 32'(code[t]); in_last = (t == code.size() - 1);
      while (!in_ready) @(negedge clk);
      @(negedge clk);
    end
    in_valid = 0; in_last = 0;
    while (got_last == 0) @(negedge clk);
    checks++;
    if (got.size() != info.size()) begin
      failures++; $display("FAIL length %0d expected %0d", got.size(), info.size());
    end else begin
      int bad = 0;
      foreach (info[t]) begin checks++; if (got[t] !== info[t]) bad++; end
      checks++;
      if (bad != 0) begin failures++; $display("FAIL block of %0d: %0d bit errors", n, bad); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    block(40, 0);
    bp = 1;
    block(120, 6);
    block(200, 10);
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
