// Self-checking test of the SOCBUS memory side: random traffic from all seven
// request ports against a memory model; checks each grant against the fixed
// priority order, each returned read word, and that every granted write lands.
// Counts how often each lower-priority port was refused (must happen).
module tb_socbus;
  localparam int BANKS = 4, DEPTH = 64, AW = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          cra_en, crb_en, cw_en, dr_en, dw_en, rw_en, hr_en, hw_en;
  logic [AW-1:0] cra_addr, crb_addr, cw_addr, dr_addr, dw_addr, rw_addr, hr_addr, hw_addr;
  logic [31:0]   cra_data, crb_data, cw_data, dr_data, dw_data, rw_data, hr_data, hw_data;
  logic          dr_gnt, dw_gnt, rw_gnt, hr_gnt, hw_gnt;
  socbus #(.BANKS(BANKS), .DEPTH(DEPTH), .W(32)) dut (.*);

  logic [31:0] model [BANKS*DEPTH];
  int refused_dr = 0, refused_dw = 0, refused_rw = 0;

  function automatic int bk(logic [AW-1:0] a); return int'(a) / DEPTH; endfunction

  initial begin
    {cra_en, crb_en, cw_en, dr_en, dw_en, rw_en, hr_en, hw_en} = '0;
    // fill through the host port, alone on the bus
    for (int a = 0; a < BANKS*DEPTH; a++) begin
      @(negedge clk); hw_en = 1; hw_addr = AW'(a); hw_data = $urandom; model[a] = hw_data;
    end
    @(negedge clk); hw_en = 0;
    for (int t = 0; t < 3000; t++) begin
      logic [31:0] ea, eb, ed, eh;
      logic        edr, ehr, erw, edw, ehw, p1busy;
      @(negedge clk);
      {cra_en, crb_en, cw_en, dr_en, dw_en, rw_en, hr_en, hw_en} = 8'($urandom);
      cra_addr = AW'($urandom); crb_addr = AW'($urandom); dr_addr = AW'($urandom);
      hr_addr = AW'($urandom); cw_addr = AW'($urandom); rw_addr = AW'($urandom);
      dw_addr = AW'($urandom); hw_addr = AW'($urandom);
      cw_data = $urandom; rw_data = $urandom; dw_data = $urandom; hw_data = $urandom;
      #1;
      // expected grants
      edr = dr_en && !(crb_en && bk(crb_addr) == bk(dr_addr));
      ehr = hr_en && !(crb_en && bk(crb_addr) == bk(hr_addr)) && !(edr && bk(dr_addr) == bk(hr_addr));
      erw = rw_en && !(cw_en && bk(cw_addr) == bk(rw_addr));
      edw = dw_en && !(cw_en && bk(cw_addr) == bk(dw_addr)) && !(erw && bk(rw_addr) == bk(dw_addr));
      ehw = hw_en && !(cw_en && bk(cw_addr) == bk(hw_addr)) && !(erw && bk(rw_addr) == bk(hw_addr))
                  && !(edw && bk(dw_addr) == bk(hw_addr));
      checks++;
      if (dr_gnt !== edr || hr_gnt !== ehr || rw_gnt !== erw || dw_gnt !== edw || hw_gnt !== ehw) begin
        failures++; $display("FAIL grants t=%0d", t);
      end
      if (dr_en && !edr) refused_dr++;
      if (dw_en && !edw) refused_dw++;
      if (rw_en && !erw) refused_rw++;
      ea = model[cra_addr]; eb = model[crb_addr]; ed = model[dr_addr]; eh = model[hr_addr];
      if (cw_en) model[cw_addr] = cw_data;
      if (erw) model[rw_addr] = rw_data;
      if (edw) model[dw_addr] = dw_data;
      if (ehw) model[hw_addr] = hw_data;
      @(posedge clk); #1;
      if (cra_en) begin checks++; if (cra_data !== ea) begin failures++; $display("FAIL core A read"); end end
      if (crb_en) begin checks++; if (crb_data !== eb) begin failures++; $display("FAIL core B read"); end end
      if (edr) begin checks++; if (dr_data !== ed) begin failures++; $display("FAIL dma read"); end end
      if (ehr) begin checks++; if (hr_data !== eh) begin failures++; $display("FAIL host read"); end end
    end
    checks++;
    if (refused_dr == 0 || refused_dw == 0 || refused_rw == 0) begin
      failures++; $display("FAIL no refusals seen");
    end
    $display("refusals: dma read %0d, dma write %0d, radio write %0d", refused_dr, refused_dw, refused_rw);
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
