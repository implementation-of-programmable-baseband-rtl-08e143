// Self-checking test of the CRC/scrambler unit: the 802.11 scrambler
// (x^7 + x^4 + 1, all-ones seed) must produce the first 32 bits of its
// published sequence from zero input; scrambling twice restores random data;
// CRC-32 (MSB first, seed all ones, no final inversion) of the nine ASCII
// characters "123456789" must give the catalogued check value 0x0376E6E7.
module tb_crc_scrambler;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we = 0; logic [3:0] cfg_addr = 0; logic [31:0] cfg_data = 0;
  logic in_valid = 0, in_ready, in_last = 0, out_valid, out_ready = 1, out_last;
  logic [31:0] in_data = 0, out_data;
  crc_scrambler dut (.*);

  logic got [$];
  logic [31:0] gotw [$];
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    got.push_back(out_data[0]);
    gotw.push_back(out_data);
  end

  task automatic cfg(input int a, input logic [31:0] d);
    cfg_we = 1; cfg_addr = 4'(a); cfg_data = d;
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic send(input logic b, input logic last);
    in_valid = 1; in_data = 32'(b); in_last = last;
    while (!in_ready) @(negedge clk);
    @(negedge clk); in_valid = 0; in_last = 0;
  endtask

  initial begin
    logic [31:0] seq;
    logic data [200];
    logic [7:0] msg [9];
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    // 802.11 scrambler sequence, first 32 bits for the all-ones state
    seq = 32'b0000_1110_1111_0010_1100_1001_0000_0010;
    cfg(0, 0); cfg(1, 32'h48); cfg(2, 7); cfg(3, 32'h7f);
    for (int t = 0; t < 32; t++) send(1'b0, t == 31);
    repeat (2) @(negedge clk);
    for (int t = 0; t < 32; t++) begin
      checks++;
      if (got[t] !== seq[31 - t]) begin failures++; $display("FAIL scrambler bit %0d", t); end
    end
    // scramble then descramble with the same seed
    got.delete();
    cfg(3, 32'h5d);
    for (int t = 0; t < 200; t++) begin data[t] = 1'($urandom); send(data[t], 1'b0); end
    repeat (2) @(negedge clk);
    begin
      logic s1 [$];
      s1 = got; got.delete();
      cfg(3, 32'h5d);
      foreach (s1[t]) send(s1[t], 1'b0);
      repeat (2) @(negedge clk);
      for (int t = 0; t < 200; t++) begin
        checks++;
        if (got[t] !== data[t]) begin failures++; $display("FAIL descramble bit %0d", t); end
      end
    end
    // CRC-32/MPEG-2 check value
    msg = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    gotw.delete();
    cfg(0, 1); cfg(1, 32'h04C11DB7); cfg(2, 32); cfg(3, 32'hffff_ffff);
    for (int i = 0; i < 9; i++)
      for (int b = 7; b >= 0; b--) send(msg[i][b], (i == 8) && (b == 0));
    repeat (2) @(negedge clk);
    checks++;
    if (gotw.size() != 1 || gotw[0] !== 32'h0376E6E7) begin
      failures++; $display("FAIL crc %h (%0d words)", gotw.size() ? gotw[0] : 0, gotw.size());
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
