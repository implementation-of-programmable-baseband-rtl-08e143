// Self-checking test of the de-mapper: every constellation point of BPSK, QPSK,
// 16-QAM and 64-QAM (802.11a Gray labels, worked out here from the level
// tables), each with random noise below half the point distance, must give the
// label bits one cycle later; also one symbol per cycle and back-pressure hold.
module tb_demapper;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we = 0; logic [3:0] cfg_addr = 0; logic [31:0] cfg_data = 0;
  logic in_valid = 0, in_ready, in_last = 0, out_valid, out_ready = 1, out_last;
  logic [31:0] in_data = 0, out_data;
  demapper dut (.*);

  localparam int U = 1000;
  // level index 0..7 -> level and 3-bit label b0 b1 b2 (b0 in bit 0) for 64-QAM
  int lev64 [8] = '{-7, -5, -3, -1, 1, 3, 5, 7};
  int lab64 [8] = '{3'b000, 3'b100, 3'b110, 3'b010, 3'b011, 3'b111, 3'b101, 3'b001};
  int lev16 [4] = '{-3, -1, 1, 3};
  int lab16 [4] = '{2'b00, 2'b10, 2'b11, 2'b01};

  task automatic cfg(input int a, input int d);
    @(negedge clk); cfg_we = 1; cfg_addr = 4'(a); cfg_data = d;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic sym(input int i, input int q, input int exp_bits);
    @(negedge clk);
    in_valid = 1;
    in_data = {16'(q * U + $signed($urandom_range(0, 1800)) - 900), 16'(i * U + $signed($urandom_range(0, 1800)) - 900)};
    @(posedge clk); #1;
    in_valid = 0;
    checks++;
    if (!out_valid || out_data !== 32'(exp_bits)) begin
      failures++; $display("FAIL sym (%0d,%0d): got %h expected %h", i, q, out_data, exp_bits);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    cfg(1, U);
    cfg(0, 0);   // BPSK
    for (int t = 0; t < 20; t++) begin int b = $urandom_range(0, 1); sym(b ? 1 : -1, 0, b); end
    cfg(0, 1);   // QPSK
    for (int t = 0; t < 20; t++) begin
      int a = $urandom_range(0, 1), b = $urandom_range(0, 1);
      sym(a ? 1 : -1, b ? 1 : -1, a | (b << 1));
    end
    cfg(0, 2);   // 16-QAM
    for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++)
      sym(lev16[a], lev16[b], lab16[a] | (lab16[b] << 2));
    cfg(0, 3);   // 64-QAM
    for (int a = 0; a < 8; a++) for (int b = 0; b < 8; b++)
      sym(lev64[a], lev64[b], lab64[a] | (lab64[b] << 3));
    // back-pressure: output must hold while not taken
    @(negedge clk); @(negedge clk); out_ready = 0; in_valid = 1; in_data = {16'(-7 * U), 16'(7 * U)};
    @(negedge clk); in_data = 0;
    repeat (3) begin
      @(posedge clk); #1; checks++;
      if (!out_valid || out_data !== 32'(6'b000001) || in_ready) begin failures++; $display("FAIL hold"); end
    end
    @(negedge clk); out_ready = 1; in_valid = 0;
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
