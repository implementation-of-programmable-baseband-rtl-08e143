// Self-checking test of the convolutional encoder: the impulse response must
// spell out the 802.11a generators 133 and 171 (octal), random bits are
// compared with a shift-register model, and output back-pressure must hold data.
module tb_conv_encoder;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we = 0; logic [3:0] cfg_addr = 0; logic [31:0] cfg_data = 0;
  logic in_valid = 0, in_ready, in_last = 0, out_valid, out_ready = 1, out_last;
  logic [31:0] in_data = 0, out_data;
  conv_encoder dut (.*);

  logic [1:0] expq [$];
  logic [1:0] got [$];
  bit bp = 0;
  always @(posedge clk) #2 out_ready = bp ? ($urandom_range(0, 3) != 0) : 1'b1;
  logic [5:0] sr = 0;   // model: previous six inputs, newest in bit 5

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    logic [1:0] e;
    e = expq.pop_front();
    got.push_back(out_data[1:0]);
    checks++;
    if (out_data !== 32'(e)) begin failures++; $display("FAIL enc got %b expected %b", out_data[1:0], e); end
  end

  // model, advanced on every accepted input
  always @(posedge clk) if (rst_n && in_valid && in_ready) begin
    logic [6:0] r;
    r = {in_data[0], sr};
    // taps of 133 = 1011011 and 171 = 1111001 (bit 6 = current input)
    expq.push_back({r[6] ^ r[5] ^ r[4] ^ r[3] ^ r[0], r[6] ^ r[4] ^ r[3] ^ r[1] ^ r[0]});
    sr = r[6:1];
  end

  task automatic send(input logic b);
    in_valid = 1; in_data = 32'(b);
    while (!in_ready) @(negedge clk);
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    logic [1:0] imp [7];
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    // impulse response written out from the octal generators
    imp = '{2'b11, 2'b10, 2'b11, 2'b11, 2'b00, 2'b01, 2'b11};
    for (int t = 0; t < 7; t++) send(t == 0);
    repeat (2) @(posedge clk);
    for (int t = 0; t < 7; t++) begin
      checks++;
      if (got[t] !== imp[t]) begin failures++; $display("FAIL impulse %0d: %b vs %b", t, got[t], imp[t]); end
    end
    for (int t = 0; t < 500; t++) begin
      bp = 1;
      send($urandom_range(0, 1));
    end
    bp = 0;
    repeat (5) @(posedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("FAIL %0d outputs missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
