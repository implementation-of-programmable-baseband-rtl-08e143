// Self-checking test of the (de)interleaver: for every 802.11a block size
// (48/1, 96/2, 192/4, 288/6 coded bits / bits per subcarrier) random blocks
// are interleaved and compared bit by bit with the two-step permutation of the
// standard computed here, then de-interleaved back to the original; the word
// widths change on the way (K_IN, K_OUT). Two hand-worked positions of the
// 48-bit BPSK case (bit 1 -> 3, bit 16 -> 1) are also checked.
module tb_interleaver;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we = 0; logic [3:0] cfg_addr = 0; logic [31:0] cfg_data = 0;
  logic in_valid = 0, in_ready, in_last = 0, out_valid, out_ready = 1, out_last;
  logic [31:0] in_data = 0, out_data;
  interleaver dut (.*);

  bit bp = 0;
  always @(posedge clk) #2 out_ready = bp ? ($urandom_range(0, 2) != 0) : 1'b1;
  int kout_now = 1;
  logic got [$];
  int lasts = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    for (int b = 0; b < kout_now; b++) got.push_back(out_data[b]);
    if (out_last) lasts++;
  end

  function automatic int jpos(int k, int n, int bpsc);
    int s, i;
    s = (bpsc / 2 > 1) ? bpsc / 2 : 1;
    i = (n / 16) * (k % 16) + k / 16;
    return s * (i / s) + (i + n - (16 * i) / n) % s;
  endfunction

  task automatic cfg(input int a, input int d);
    cfg_we = 1; cfg_addr = 4'(a); cfg_data = d;
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic run(input logic bits [], input int kin, input int kout, output logic res []);
    got.delete(); lasts = 0; kout_now = kout;
    for (int w = 0; w < bits.size() / kin; w++) begin
      in_valid = 1; in_data = 0; in_last = (w == bits.size() / kin - 1);
      for (int b = 0; b < kin; b++) in_data[b] = bits[w * kin + b];
      while (!in_ready) @(negedge clk);
      @(negedge clk);
    end
    in_valid = 0; in_last = 0;
    while (lasts == 0) @(negedge clk);
    res = new[got.size()];
    foreach (got[t]) res[t] = got[t];
  endtask

  initial begin
    int nc [4] = '{48, 96, 192, 288};
    int nb [4] = '{1, 2, 4, 6};
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    checks++; if (jpos(1, 48, 1) != 3 || jpos(16, 48, 1) != 1) failures++;
    for (int m = 0; m < 4; m++) begin
      automatic logic src [], ilv [], back [];
      automatic int n = nc[m];
      src = new[n];
      foreach (src[t]) src[t] = 1'($urandom);
      bp = (m % 2 == 1);
      cfg(0, 0); cfg(1, n); cfg(2, nb[m]); cfg(3, 2); cfg(4, nb[m]);
      run(src, 2, nb[m], ilv);
      checks++;
      if (ilv.size() != n) begin failures++; $display("FAIL size %0d", ilv.size()); end
      else for (int k = 0; k < n; k++) begin
        checks++;
        if (ilv[jpos(k, n, nb[m])] !== src[k]) begin
          failures++; $display("FAIL N=%0d bit %0d j=%0d src=%b", n, k, jpos(k, n, nb[m]), src[k]);
        end
      end
      cfg(0, 1); cfg(1, n); cfg(2, nb[m]); cfg(3, nb[m]); cfg(4, 2);
      run(ilv, nb[m], 2, back);
      for (int k = 0; k < n; k++) begin
        checks++;
        if (back[k] !== src[k]) begin failures++; $display("FAIL deint N=%0d bit %0d", n, k); end
      end
    end
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
