// Workload test: the receive chain for one 64-QAM OFDM data symbol of
// IEEE 802.11a on the whole processor at its default sizes.
//
// One symbol carries 48 data subcarriers of 6 bits, i.e. N_CBPS = 288 coded
// bits; with the rate-1/2 code that is 144 trellis steps (138 data bits and six
// zero tail bits here, so the block is terminated). The test encodes and
// interleaves random bits itself, places the 48 constellation points in memory
// through the host port, and runs firmware that chains three DMA jobs:
// de-mapper (64-QAM), de-interleaver (288 bits, 6 bits in, 2 bits out per
// word) and Viterbi decoder. Every intermediate word and every decoded bit is
// compared with the values computed here.
// It also measures how many cycles each job keeps the DMA manager busy. In a
// symbol-pipelined receiver (demodulation of symbol k overlapping decoding of
// symbol k-1) each stage must finish within one symbol period: 4 us, or 640
// cycles at a 160 MHz clock. The test fails if a stage does not.
module tb_wl_qam64_symbol;
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
  function automatic logic [1:0] enc(ref logic [5:0] sr, input logic b);
    logic [6:0] r;
    r = {b, sr};
    sr = r[6:1];
    return {r[6] ^ r[5] ^ r[4] ^ r[3] ^ r[0], r[6] ^ r[4] ^ r[3] ^ r[1] ^ r[0]};
  endfunction
  function automatic int jpos(int k, int n, int bpsc);
    int s, i;
    s = (bpsc / 2 > 1) ? bpsc / 2 : 1;
    i = (n / 16) * (k % 16) + k / 16;
    return s * (i / s) + (i + n - (16 * i) / n) % s;
  endfunction

  localparam int NCB = 288, NSTEP = 144, NDATA = 138, U = 1000, BUDGET = 640;
  localparam int A_SYM = 0, A_DEM = 1024, A_DIL = 2048, A_DEC = 3072;
  // 64-QAM per-axis Gray labels (b0 in bit 0) of the levels -7 .. 7
  int lev64 [8] = '{-7, -5, -3, -1, 1, 3, 5, 7};
  int lab64 [8] = '{3'b000, 3'b100, 3'b110, 3'b010, 3'b011, 3'b111, 3'b101, 3'b001};

  function automatic int level_of(logic [2:0] lab);
    for (int a = 0; a < 8; a++) if (lab64[a] == int'(lab)) return lev64[a] * U;
    return 0;
  endfunction

  initial begin
    logic data [NSTEP];
    logic [1:0] code [NSTEP];
    logic coded [NCB], ilv [NCB];
    logic [5:0] lab [48];
    logic [5:0] sr;
    int t0;

    repeat (3) @(posedge clk); rst_n = 1;
    // ---------- transmitter model ----------
    for (int i = 0; i < NSTEP; i++) data[i] = (i < NDATA) ? 1'($urandom) : 1'b0;
    sr = 0;
    for (int i = 0; i < NSTEP; i++) begin
      code[i] = enc(sr, data[i]);
      coded[2 * i] = code[i][0]; coded[2 * i + 1] = code[i][1];
    end
    for (int k = 0; k < NCB; k++) ilv[jpos(k, NCB, 6)] = coded[k];
    for (int w = 0; w < 48; w++) begin
      for (int b = 0; b < 6; b++) lab[w][b] = ilv[6 * w + b];
      // points with a little noise, well inside the decision regions
      mwrite(A_SYM + w, {16'(level_of(lab[w][5:3]) + $signed($urandom_range(0, 600)) - 300),
                         16'(level_of(lab[w][2:0]) + $signed($urandom_range(0, 600)) - 300)});
    end

    // ---------- firmware ----------
    cfgw(8'h10, 3); cfgw(8'h11, U);
    cfgw(8'h20, 1); cfgw(8'h21, NCB); cfgw(8'h22, 6); cfgw(8'h23, 6); cfgw(8'h24, 2);
    dma(A_SYM, A_DEM, 48, UNIT_DEMAP);
    dma(A_DEM, A_DIL, 48, UNIT_ILV);
    dma(A_DIL, A_DEC, NSTEP, UNIT_VIT);
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
    for (int w = 0; w < 48; w++) expect_eq(A_DEM + w, 32'(lab[w]), "de-mapped label");
    for (int i = 0; i < NSTEP; i++) expect_eq(A_DIL + i, 32'(code[i]), "de-interleaved pair");
    for (int i = 0; i < NSTEP; i++) expect_eq(A_DEC + i, 32'(data[i]), "decoded bit");

    checks++;
    if (busy_cycles.size() != 3) begin failures++; $display("FAIL %0d DMA jobs", busy_cycles.size()); end
    else begin
      $display("cycles per stage: de-map %0d, de-interleave %0d, Viterbi %0d (budget %0d per symbol)",
               busy_cycles[0], busy_cycles[1], busy_cycles[2], BUDGET);
      for (int s = 0; s < 3; s++) begin
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
