// Self-checking test of a data memory bank: random writes, reads on both ports
// one cycle after the address, and read-during-write returning the old word.
module tb_dm_bank;
  localparam int DEPTH = 1024;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic re0 = 0, re1 = 0, we = 0;
  logic [9:0] ra0 = 0, ra1 = 0, wa = 0;
  logic [31:0] rd0, rd1, wd = 0;
  dm_bank #(.W(32), .DEPTH(DEPTH)) dut (.*);

  logic [31:0] model [DEPTH];

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; wa = 10'(a); wd = $urandom; model[a] = wd;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 2000; t++) begin
      logic [31:0] e0, e1;
      @(negedge clk);
      re0 = 1; re1 = 1; ra0 = 10'($urandom); ra1 = 10'($urandom);
      we = $urandom_range(0, 1); wa = (t % 3 == 0) ? ra0 : 10'($urandom); wd = $urandom;
      e0 = model[ra0]; e1 = model[ra1];
      if (we) model[wa] = wd;
      @(posedge clk); #1;
      checks += 2;
      if (rd0 !== e0) begin failures++; $display("FAIL port0 @%0d", ra0); end
      if (rd1 !== e1) begin failures++; $display("FAIL port1 @%0d", ra1); end
    end
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
