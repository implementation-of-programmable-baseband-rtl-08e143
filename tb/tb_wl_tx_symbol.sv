// Workload test: the transmit chain for one 64-QAM OFDM data symbol of
// IEEE 802.11a on the whole processor at its default sizes.
//
// 144 random information bits (one symbol's worth at rate 1/2) are placed in
// memory through the host port. Firmware then chains four DMA jobs through the
// accelerators: scrambler (x^7 + x^4 + 1, seed 0x5d), convolutional encoder
// (133/171 octal), interleaver (N_CBPS 288, N_BPSC 6, 2 bits in and 6 bits out
// per word) and mapper (64-QAM, Gray levels loaded by the firmware). Every
// intermediate word and every constellation point is compared with the values
// computed here by independent models of the four steps.
// It also measures how many cycles each job keeps the DMA manager busy and
// checks that each stays within one symbol period (4 us, 640 cycles at 160 MHz).
// The IFFT that would follow on the core is not part of this test.
module tb_wl_tx_symbol;
  import bbp_pkg::*;
  localparam int AW = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic im_we = 0; logic [7:0] im_addr = 0; logic [31:0] im_data = 0;
  logic start = 0, halted;
  logic host_wr_en = 0, host_rd_en = 0, host_wr_gnt, host_rd_gnt;
  logic [AW-1:0] host_wr_addr = 0, host_rd_addr = 0;
  logic [31:0] host_wr_data = 0, host_rd_data;
  logic adc_valid = 0; logic [31:0] adc_data = 0;
  logic dac_valid, dac_ready = 1; logic [31:0] dac_data;
  logic dma_busy, dma_done; logic [AW-1:0] rx_wptr; logic [15:0] rx_overflows;

  bbp_top dut (.*);

  // ---------------- assembler ----------------
  logic [31:0] prog [$];
  function automatic logic [31:0] I(opcode_e op, int rd = 0, int rs = 0, int rt = 0, int imm = 0);
    return {op, 1'b0, 1'b0, 3'(rd), 3'(rs), 3'(rt), 16'(imm)};
  endfunction
  task automatic emit(logic [31:0] w); prog.push_back(w); endtask
  task automatic cfgw(int addr, logic [31:0] v);
    emit(I(OP_LDIL, 7, 0, 0, int'(v[15:0])));
    emit(I(OP_LDIH, 7, 0, 0, int'(v[31:16])));
    emit(I(OP_OUT, 0, 7, 0, addr));
  endtask
  task automatic dma(int src, int dst, int len, int acc);
    cfgw(8'ha0, src); cfgw(8'ha1, dst); cfgw(8'ha2, len); cfgw(8'ha3, {1'b1, 3'(acc)});
    emit(I(OP_WAITD));
  endtask

  // ---------------- host memory access ----------------
  task automatic mwrite(int a, logic [31:0] d);
    @(negedge clk); host_wr_en = 1; host_wr_addr = AW'(a); host_wr_data = d;
    #1; while (!host_wr_gnt) begin @(negedge clk); #1; end
    @(negedge clk); host_wr_en = 0;
  endtask
  task automatic mread(int a, output logic [31:0] d);
    @(negedge clk); host_rd_en = 1; host_rd_addr = AW'(a);
    #1; while (!host_rd_gnt) begin @(negedge clk); #1; end
    @(negedge clk); host_rd_en = 0; d = host_rd_data;
  endtask
  task automatic expect_eq(int a, logic [31:0] e, string what);
    logic [31:0] d;
    mread(a, d);
    checks++;
    if (d !== e) begin failures++; $display("FAIL %s @%0d: got %h expected %h", what, a, d, e); end
  endtask

  // ---------------- stage timing ----------------
  int busy_cycles [$];
  int cur = 0;
  always @(posedge clk) if (rst_n) begin
    if (dma_busy) cur++;
    if (dma_done) begin busy_cycles.push_back(cur); cur = 0; end
  end

  // ---------------- reference models ----------------
  // encoder: r = {u, previous six inputs}; bit 0 from 133 (octal), bit 1 from 171
  function automatic logic [1:0] enc(ref logic [5:0] sr, input logic b);
    logic [6:0] r;
    r = {b, sr};
    sr = r[6:1];
    return {^(r & 7'o171), ^(r & 7'o133)};
  endfunction
  function automatic int jpos(int k, int n, int bpsc);
    int s, i;
    s = (bpsc / 2 > 1) ? bpsc / 2 : 1;
    i = (n / 16) * (k % 16) + k / 16;
    return s * (i / s) + (i + n - (16 * i) / n) % s;
  endfunction

  localparam int NCB = 288, NSTEP = 144, U = 1000, BUDGET = 640;
  localparam int A_BIT = 0, A_SCR = 512, A_COD = 1024, A_ILV = 2048, A_MAP = 3072;
  // 64-QAM per-axis Gray labels (first bit in bit 0) of the levels -7 .. 7
  int lev64 [8] = '{-7, -5, -3, -1, 1, 3, 5, 7};
  int lab64 [8] = '{3'b000, 3'b100, 3'b110, 3'b010, 3'b011, 3'b111, 3'b101, 3'b001};

  function automatic int level_of(logic [2:0] lab);
    for (int a = 0; a < 8; a++) if (lab64[a] == int'(lab)) return lev64[a] * U;
    return 0;
  endfunction

  initial begin
    logic data [NSTEP], scr [NSTEP];
    logic [1:0] code [NSTEP];
    logic coded [NCB], ilv [NCB];
    logic [5:0] lab [48];
    logic [5:0] sr;
    logic [6:0] st;
    int t0;

    repeat (3) @(posedge clk); rst_n = 1;
    // ---------- models ----------
    st = 7'h5d;
    for (int i = 0; i < NSTEP; i++) begin
      logic fb;
      data[i] = 1'($urandom);
      fb = ^(st & 7'h48);
      scr[i] = data[i] ^ fb;
      st = {st[5:0], fb};
      mwrite(A_BIT + i, 32'(data[i]));
    end
    sr = 0;
    for (int i = 0; i < NSTEP; i++) begin
      code[i] = enc(sr, scr[i]);
      coded[2 * i] = code[i][0]; coded[2 * i + 1] = code[i][1];
    end
    for (int k = 0; k < NCB; k++) ilv[jpos(k, NCB, 6)] = coded[k];
    for (int w = 0; w < 48; w++) for (int b = 0; b < 6; b++) lab[w][b] = ilv[6 * w + b];

    // ---------- firmware ----------
    cfgw(8'h30, 0); cfgw(8'h31, 32'h48); cfgw(8'h32, 7); cfgw(8'h33, 32'h5d);
    dma(A_BIT, A_SCR, NSTEP, UNIT_CRC);
    cfgw(8'h42, 0);
    dma(A_SCR, A_COD, NSTEP, UNIT_CONV);
    cfgw(8'h20, 0); cfgw(8'h21, NCB); cfgw(8'h22, 6); cfgw(8'h23, 2); cfgw(8'h24, 6);
    dma(A_COD, A_ILV, NSTEP, UNIT_ILV);
    cfgw(8'h70, 3); cfgw(8'h71, 0);
    for (int v = 0; v < 8; v++) cfgw(8'h72, 32'(level_of(3'(v))));
    dma(A_ILV, A_MAP, 48, UNIT_MAP);
    emit(I(OP_HALT));
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk); im_we = 1; im_addr = 8'(i); im_data = prog[i];
    end
    @(negedge clk); im_we = 0; start = 1;
    @(negedge clk); start = 0;
    t0 = 0;
    while (!halted && t0 < 20000) begin @(negedge clk); t0++; end
    checks++; if (!halted) begin failures++; $display("FAIL program did not halt"); end

    // ---------- results ----------
    for (int i = 0; i < NSTEP; i++) expect_eq(A_SCR + i, 32'(scr[i]), "scrambled bit");
    for (int i = 0; i < NSTEP; i++) expect_eq(A_COD + i, 32'(code[i]), "coded pair");
    for (int w = 0; w < 48; w++) expect_eq(A_ILV + w, 32'(lab[w]), "interleaved label");
    for (int w = 0; w < 48; w++)
      expect_eq(A_MAP + w, {16'(level_of(lab[w][5:3])), 16'(level_of(lab[w][2:0]))}, "point");

    checks++;
    if (busy_cycles.size() != 4) begin failures++; $display("FAIL %0d DMA jobs", busy_cycles.size()); end
    else begin
      $display("cycles per stage: scramble %0d, encode %0d, interleave %0d, map %0d (budget %0d per symbol)",
               busy_cycles[0], busy_cycles[1], busy_cycles[2], busy_cycles[3], BUDGET);
      for (int s = 0; s < 4; s++) begin
        checks++;
        if (busy_cycles[s] > BUDGET) begin failures++; $display("FAIL stage %0d over the symbol budget", s); end
      end
    end
    $display("whole program %0d cycles", t0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
