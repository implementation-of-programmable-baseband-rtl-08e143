// Self-checking test of the CMAC: random complex products with and without
// conjugation (XR/XI one cycle after the operands), accumulation into every
// accumulator register, clearing, and the two-cycle accumulator latency.
module tb_cmac;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, conj = 0, acc_en = 0, clr = 0;
  logic [1:0] acc_sel = 0, rd_sel = 0;
  logic signed [15:0] ar = 0, ai = 0, br = 0, bi = 0;
  logic out_valid;
  logic signed [31:0] xr, xi, acc_re, acc_im;

  cmac #(.N(16), .NACC(4)) dut (.*);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  longint mr [4], mi [4];
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // products
    for (int t = 0; t < 200; t++) begin
      longint er, ei;
      @(negedge clk);
      ar = 16'($urandom); ai = 16'($urandom); br = 16'($urandom); bi = 16'($urandom);
      conj = t[0]; in_valid = 1; acc_en = 0;
      if (conj) begin er = ar*br + ai*bi; ei = ai*br - ar*bi; end
      else      begin er = ar*br - ai*bi; ei = ai*br + ar*bi; end
      er = longint'(32'(er)); ei = longint'(32'(ei));
      @(posedge clk); #1;
      check("out_valid", out_valid, 1);
      check("xr", xr, longint'($signed(32'(er))));
      check("xi", xi, longint'($signed(32'(ei))));
    end
    // accumulation with small operands (no wrap)
    for (int k = 0; k < 4; k++) begin mr[k] = 0; mi[k] = 0; end
    for (int t = 0; t < 100; t++) begin
      int s;
      @(negedge clk);
      s = $urandom_range(0, 3);
      ar = 16'($signed($urandom_range(0, 2000)) - 1000); ai = 16'($signed($urandom_range(0, 2000)) - 1000);
      br = 16'($signed($urandom_range(0, 2000)) - 1000); bi = 16'($signed($urandom_range(0, 2000)) - 1000);
      conj = $urandom_range(0, 1); acc_en = 1; acc_sel = 2'(s); in_valid = 1;
      clr = (t < 4) ? 1'b1 : 1'b0;
      if (t < 4) begin acc_sel = 2'(t); s = t; mr[s] = 0; mi[s] = 0; end
      if (conj) begin mr[s] += ar*br + ai*bi; mi[s] += ai*br - ar*bi; end
      else      begin mr[s] += ar*br - ai*bi; mi[s] += ai*br + ar*bi; end
    end
    @(negedge clk); in_valid = 0; acc_en = 0; clr = 0;
    // latency: last accumulation visible two cycles after its operands
    @(posedge clk); @(posedge clk); #1;
    for (int k = 0; k < 4; k++) begin
      rd_sel = 2'(k); #1;
      check($sformatf("acc_re[%0d]", k), acc_re, mr[k]);
      check($sformatf("acc_im[%0d]", k), acc_im, mi[k]);
    end
    // energy: conj product of a number with itself
    @(negedge clk);
    ar = 300; ai = -400; br = 300; bi = -400; conj = 1; acc_en = 1; clr = 1; acc_sel = 1; in_valid = 1;
    @(negedge clk); in_valid = 0; acc_en = 0; clr = 0;
    @(negedge clk); rd_sel = 1; #1;
    check("energy", acc_re, 250000);
    check("energy im", acc_im, 0);
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
