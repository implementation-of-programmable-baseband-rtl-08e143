// Self-checking test of the baseband core, connected to the SOCBUS and its
// memory banks. A program exercises every instruction: modulo convolution with
// conjugation (CONV), vector product (VMUL), vector energy (ENERGY), ABS,
// LD/ST through wrapping address generators, LUT, MOVACC, ADD/SUB with
// saturation, the hardware loop (SETC/DBNZ), OUT on the configuration bus and
// WAITD. Results stored by the program are read back through the host port and
// compared with values computed here. A second program measures the cycle
// count of a vector instruction: N + 2 cycles.
module tb_bbp_core;
  import bbp_pkg::*;
  localparam int AW = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic im_we = 0; logic [7:0] im_addr = 0; logic [31:0] im_data = 0;
  logic start = 0, halted;
  logic cra_en, crb_en, cw_en; logic [AW-1:0] cra_addr, crb_addr, cw_addr;
  logic [31:0] cra_data, crb_data, cw_data;
  logic cfg_we; logic [7:0] cfg_addr; logic [31:0] cfg_data;
  logic dma_busy = 0;
  logic hw_en = 0, hr_en = 0, hw_gnt, hr_gnt; logic [AW-1:0] hw_addr = 0, hr_addr = 0;
  logic [31:0] hw_data = 0, hr_data;
  logic dr_gnt, dw_gnt, rw_gnt; logic [31:0] dr_data;

  bbp_core #(.AW(AW), .IM_DEPTH(256)) dut (.*);
  socbus #(.BANKS(4), .DEPTH(1024), .W(32)) bus (
    .clk, .cra_en, .cra_addr, .cra_data, .crb_en, .crb_addr, .crb_data,
    .cw_en, .cw_addr, .cw_data,
    .dr_en(1'b0), .dr_addr('0), .dr_gnt, .dr_data, .dw_en(1'b0), .dw_addr('0), .dw_data('0), .dw_gnt,
    .rw_en(1'b0), .rw_addr('0), .rw_data('0), .rw_gnt,
    .hr_en, .hr_addr, .hr_gnt, .hr_data, .hw_en, .hw_addr, .hw_data, .hw_gnt);

  // ---------- helpers ----------
  logic [31:0] prog [$];
  function automatic logic [31:0] I(opcode_e op, int rd = 0, int rs = 0, int rt = 0, int imm = 0,
                                    bit conj = 0, bit clr = 0);
    return {op, conj, clr, 3'(rd), 3'(rs), 3'(rt), 16'(imm)};
  endfunction
  task automatic agu(int a, int base, int len, int ptr, int step = 1);
    prog.push_back(I(OP_SETAGU, 0, a, 0, base)); prog.push_back(I(OP_SETAGU, 0, a, 1, len));
    prog.push_back(I(OP_SETAGU, 0, a, 2, ptr));  prog.push_back(I(OP_SETAGU, 0, a, 3, step));
  endtask
  function automatic int s16(int v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction
  function automatic int rnd(longint v);
    return s16(int'((v + 16384) >>> 15));
  endfunction
  task automatic load_and_run();
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk); im_we = 1; im_addr = 8'(i); im_data = prog[i];
    end
    @(negedge clk); im_we = 0; start = 1;
    @(negedge clk); start = 0;
  endtask
  task automatic mwrite(int a, logic [31:0] d);
    @(negedge clk); hw_en = 1; hw_addr = AW'(a); hw_data = d;
    @(negedge clk); hw_en = 0;
  endtask
  task automatic mread(int a, output logic [31:0] d);
    @(negedge clk); hr_en = 1; hr_addr = AW'(a);
    @(negedge clk); hr_en = 0; d = hr_data;
  endtask
  task automatic expect_word(int a, int re, int im, string what);
    logic [31:0] d;
    mread(a, d);
    checks++;
    if ($signed(d[15:0]) != re || $signed(d[31:16]) != im) begin
      failures++;
      $display("FAIL %s @%0d: got (%0d,%0d) expected (%0d,%0d)", what, a, $signed(d[15:0]),
               $signed(d[31:16]), re, im);
    end
  endtask

  int v1r [16], v1i [16], v2r [16], v2i [16];
  logic [31:0] cfg_seen [$];
  always @(posedge clk) if (rst_n && cfg_we) cfg_seen.push_back({16'(cfg_addr), cfg_data[15:0]});

  initial begin
    longint ar, ai;
    int mx, mn, n;
    int cyc0, cyc1, t0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      v1r[i] = $signed($urandom_range(0, 16000)) - 8000; v1i[i] = $signed($urandom_range(0, 16000)) - 8000;
      v2r[i] = $signed($urandom_range(0, 16000)) - 8000; v2i[i] = $signed($urandom_range(0, 16000)) - 8000;
      mwrite(i, {16'(v1i[i]), 16'(v1r[i])});
      mwrite(1024 + i, {16'(v2i[i]), 16'(v2r[i])});
    end
    mwrite(3086, 0);   // the loop must stop before this word
    // ---------- program ----------
    agu(0, 0, 12, 5); agu(1, 1024, 16, 0); agu(3, 3072, 64, 0);
    prog.push_back(I(OP_SETN, 0, 0, 0, 16));
    prog.push_back(I(OP_CONV, 0, 0, 1, 0, 1, 1));            // acc0 = sum V1[(5+i)%12]*conj(V2[i])
    prog.push_back(I(OP_MOVACC, 1, 0, 0, 15));               // r1 = acc0 >>> 15
    prog.push_back(I(OP_ST, 1, 3));                          // mem[3072]
    agu(2, 2048, 64, 0);
    prog.push_back(I(OP_SETAGU, 0, 0, 2, 0));                // a0.ptr = 0
    prog.push_back(I(OP_SETN, 0, 0, 0, 10));
    prog.push_back(I(OP_VMUL, 0, 0, 1, 2));                  // mem[2048+i] = V1[i]*V2[i]
    prog.push_back(I(OP_ENERGY, 1, 1, 0, 0, 0, 1));          // acc1 = sum |V2[(i)%16]|^2, i = 0..9
    prog.push_back(I(OP_MOVACC, 2, 1, 0, 12));
    prog.push_back(I(OP_ST, 2, 3));                          // mem[3073]
    prog.push_back(I(OP_LDIL, 3, 0, 0, 3000));
    prog.push_back(I(OP_LDIH, 3, 0, 0, -4000));
    prog.push_back(I(OP_ABS, 4, 3));
    prog.push_back(I(OP_ST, 4, 3));                          // mem[3074]
    prog.push_back(I(OP_LDIL, 5, 0, 0, 30000));
    prog.push_back(I(OP_LDIH, 5, 0, 0, -30000));
    prog.push_back(I(OP_ADD, 6, 5, 3));
    prog.push_back(I(OP_SUB, 7, 5, 3));
    prog.push_back(I(OP_ST, 6, 3));                          // mem[3075]
    prog.push_back(I(OP_ST, 7, 3));                          // mem[3076]
    prog.push_back(I(OP_LDIL, 0, 0, 0, 7));
    prog.push_back(I(OP_LUT, 7, 0, 0, 1024));                // r7 = V2[7]
    prog.push_back(I(OP_ST, 7, 3));                          // mem[3077]
    prog.push_back(I(OP_SETAGU, 0, 0, 2, 10));               // a0.ptr = 10 (len 12)
    prog.push_back(I(OP_LD, 1, 0)); prog.push_back(I(OP_LD, 2, 0)); prog.push_back(I(OP_LD, 3, 0));
    prog.push_back(I(OP_ST, 1, 3)); prog.push_back(I(OP_ST, 2, 3)); prog.push_back(I(OP_ST, 3, 3)); // 3078..80
    prog.push_back(I(OP_SETC, 0, 0, 0, 5));
    prog.push_back(I(OP_ST, 0, 3));                          // loop body: 3081..3085
    prog.push_back(I(OP_DBNZ, 0, 0, 0, prog.size() - 1));
    prog.push_back(I(OP_LDIL, 1, 0, 0, 16'h1234));
    prog.push_back(I(OP_OUT, 0, 1, 0, 8'ha3));
    prog.push_back(I(OP_WAITD));
    prog.push_back(I(OP_HALT));
    load_and_run();
    // DMA busy from the cycle after the OUT for 20 cycles
    while (cfg_seen.size() == 0) @(negedge clk);
    dma_busy = 1;
    repeat (20) begin
      @(negedge clk); checks++; if (halted) begin failures++; $display("FAIL WAITD did not wait"); end
    end
    dma_busy = 0;
    t0 = 0;
    while (!halted && t0 < 100) begin @(negedge clk); t0++; end
    checks++; if (!halted) begin failures++; $display("FAIL no halt"); end
    checks++; if (cfg_seen.size() != 1 || cfg_seen[0] !== {16'h00a3, 16'h1234}) begin
      failures++; $display("FAIL OUT");
    end
    // ---------- expected results ----------
    ar = 0; ai = 0;
    for (int i = 0; i < 16; i++) begin
      automatic int k = (5 + i) % 12;
      ar += longint'(v1r[k]) * v2r[i] + longint'(v1i[k]) * v2i[i];
      ai += longint'(v1i[k]) * v2r[i] - longint'(v1r[k]) * v2i[i];
    end
    expect_word(3072, s16(int'(ar >>> 15)), s16(int'(ai >>> 15)), "CONV");
    for (int i = 0; i < 10; i++)
      expect_word(2048 + i, rnd(longint'(v1r[i]) * v2r[i] - longint'(v1i[i]) * v2i[i]),
                  rnd(longint'(v1i[i]) * v2r[i] + longint'(v1r[i]) * v2i[i]), "VMUL");
    ar = 0;
    for (int i = 0; i < 10; i++) ar += longint'(v2r[i]) * v2r[i] + longint'(v2i[i]) * v2i[i];
    expect_word(3073, s16(int'(ar >>> 12)), 0, "ENERGY");
    mx = 4000; mn = 3000;
    expect_word(3074, mx + mn / 4 + mn / 8, 0, "ABS");
    expect_word(3075, s16(30000 + 3000), s16(-30000 - 4000), "ADD");
    expect_word(3076, s16(30000 - 3000), s16(-30000 + 4000), "SUB");
    expect_word(3077, v2r[7], v2i[7], "LUT");
    expect_word(3078, v1r[10], v1i[10], "LD modulo");
    expect_word(3079, v1r[11], v1i[11], "LD modulo");
    expect_word(3080, v1r[0], v1i[0], "LD wrap");
    for (int i = 0; i < 5; i++) expect_word(3081 + i, 7, 0, "loop");
    expect_word(3086, 0, 0, "loop count (word after the loop untouched)");
    // ---------- vector timing: SETN; CONV; HALT ----------
    foreach (n_list[j]) begin
      n = n_list[j];
      prog.delete();
      prog.push_back(I(OP_SETN, 0, 0, 0, n));
      prog.push_back(I(OP_CONV, 0, 0, 1, 0, 0, 1));
      prog.push_back(I(OP_HALT));
      for (int i = 0; i < prog.size(); i++) begin
        @(negedge clk); im_we = 1; im_addr = 8'(i); im_data = prog[i];
      end
      @(negedge clk); im_we = 0; start = 1;
      @(posedge clk); cyc0 = $time; @(negedge clk); start = 0;
      while (!halted) begin @(posedge clk); #1; end
      cyc1 = ($time - cyc0) / 10;
      // one cycle SETN, N + 2 for CONV, one for HALT
      checks++;
      if (cyc1 != n + 4) begin failures++; $display("FAIL CONV N=%0d took %0d edges", n, cyc1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int n_list [3] = '{1, 16, 40};
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
