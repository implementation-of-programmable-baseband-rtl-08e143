// End-to-end test of the baseband processor at its default sizes.
//
// A firmware program, assembled here, runs on the core and drives the whole
// chip through the configuration bus:
//  1. sets up the receive FIR and the circular receive buffer; the radio input
//     streams samples while the core runs a VMUL into the same memory bank, so
//     some receive writes collide and are dropped (overflow);
//  2. measures the energy of the 64-word receive buffer with ENERGY;
//  3. transmit chain: scrambles 90 random bits, convolutionally encodes them
//     with 6 tail bits, interleaves the 192 coded bits for 16-QAM, and maps each
//     4-bit label to a constellation point with a LUT loop in the core (and once
//     more with the mapper accelerator, which must agree); while the
//     first DMA job runs the core correlates vectors in the same bank (CONV) so
//     the DMA manager is refused memory cycles; the symbols also go out through
//     the DAC port, which applies back-pressure, once as they are and once
//     shaped by the filter turned to the transmit direction;
//  4. receive chain on the same symbols: de-mapper, de-interleaver, Viterbi
//     decoder, descrambler, and a CRC-32 over the original bits;
//  5. 1/x of eight numbers.
// A second, short program then switches the receive port to the unfiltered
// converter samples (filter bypass) into a new buffer and halts; the samples
// that follow must land in memory unchanged. A third program goes back to the
// filtered path with the RAKE receiver combining two fingers (delay 0, weight
// 1/2; delay 2, weight j/4); the buffer must then hold the RAKE combination of
// the filter output.
// The test then reads memory through the host port and compares every result
// with values computed here, and counts the mechanisms that must have happened.
module tb_bbp_top;
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
  function automatic logic [31:0] I(opcode_e op, int rd = 0, int rs = 0, int rt = 0, int imm = 0,
                                    bit conj = 0, bit clr = 0);
    return {op, conj, clr, 3'(rd), 3'(rs), 3'(rt), 16'(imm)};
  endfunction
  task automatic emit(logic [31:0] w); prog.push_back(w); endtask
  task automatic agu(int a, int base, int len, int ptr = 0, int step = 1);
    emit(I(OP_SETAGU, 0, a, 0, base)); emit(I(OP_SETAGU, 0, a, 1, len));
    emit(I(OP_SETAGU, 0, a, 2, ptr));
    if (step != 1) emit(I(OP_SETAGU, 0, a, 3, step));   // steps are 1 after reset
  endtask
  int r7_hi = 0;   // upper half of r7 as last loaded (0 after reset)
  task automatic cfgw(int addr, logic [31:0] v);
    emit(I(OP_LDIL, 7, 0, 0, int'(v[15:0])));
    if (int'(v[31:16]) != r7_hi) begin emit(I(OP_LDIH, 7, 0, 0, int'(v[31:16]))); r7_hi = int'(v[31:16]); end
    emit(I(OP_OUT, 0, 7, 0, addr));
  endtask
  task automatic dma(int src, int dst, int len, int acc, bit wb, bit wait_done = 1);
    cfgw(8'ha0, src); cfgw(8'ha1, dst); cfgw(8'ha2, len); cfgw(8'ha3, {wb, 3'(acc)});
    if (wait_done) emit(I(OP_WAITD));
  endtask
  task automatic delay(int n);
    emit(I(OP_SETC, 0, 0, 0, n)); emit(I(OP_DBNZ, 0, 0, 0, prog.size()));
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

  // ---------------- mechanism counters ----------------
  int n_dma_refused = 0, n_dac_stall = 0, n_waitd = 0, n_wrap = 0, n_cmac = 0, n_acc [8];
  int n_fir = 0, n_bypass = 0, n_rake = 0, n_shaped = 0;
  logic [31:0] fir_hist [$];
  logic [31:0] dac_got [$];
  always @(posedge clk) if (rst_n) begin
    if (dut.dr_en && !dut.dr_gnt) n_dma_refused++;
    if (dac_valid && !dac_ready) n_dac_stall++;
    if (dac_valid && dac_ready) dac_got.push_back(dac_data);
    if (dut.u_core.state == 3'd1 && dut.u_core.ir.op == OP_WAITD && dma_busy) n_waitd++;
    if (dut.u_core.u_cmac.out_valid) n_cmac++;
    if (dut.fir_valid) begin n_fir++; fir_hist.push_back(dut.fir_data); end
    if (dut.rake_valid && dut.u_rake.en) n_rake++;
    if (dut.fir_tx && dac_valid && dac_ready) n_shaped++;
    if (dut.u_rx.raw && dut.rw_en && dut.rw_gnt) n_bypass++;
    for (int a = 0; a < 8; a++) if (dut.a_out_valid[a] && dut.a_out_ready[a]) n_acc[a]++;
  end
  // modulo wrap: the pointer of an AGU goes back to zero after an access
  logic [AW-1:0] last_ptr [4];
  always @(posedge clk) begin
    for (int k = 0; k < 4; k++) begin
      if (rst_n && last_ptr[k] > 0 && dut.u_core.agu_ptr[k] == 0 &&
          last_ptr[k] + dut.u_core.agu_step[k] >= dut.u_core.agu_len[k]) n_wrap++;
      last_ptr[k] = dut.u_core.agu_ptr[k];
    end
  end
  always @(posedge clk) #2 dac_ready = ($urandom_range(0, 3) != 0);

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

  localparam int NINFO = 90, NSTEP = 96, NCB = 192, U = 2000;
  localparam int A_INFO = 1024, A_SCR = 1200, A_COD = 1300;
  localparam int A_ILV = 2048, A_LUT = 2200, A_SYM = 2300, A_DEM = 2400, A_MAP = 2500;
  localparam int A_DIL = 3072, A_DEC = 3200, A_DSC = 3300, A_CRC = 3400, A_RX = 3500, A_RY = 3520;
  localparam int A_RES = 3600;

  logic info [NINFO];
  int lev [4] = '{-3, 3, -1, 1};   // 16-QAM level of the 2-bit label b0 | b1 << 1

  initial begin
    logic [31:0] d;
    logic [31:0] x_val [8];
    logic scr [NINFO];
    logic [1:0] code [NSTEP];
    logic coded [NCB], ilv [NCB];
    logic [6:0] st;
    logic [31:0] crc;
    logic [5:0] sr;
    longint energy;
    int t0;
    logic [31:0] raw_smp [20];
    int rake_base;
    cplx_t last_adc, prev_sym;

    repeat (3) @(posedge clk); rst_n = 1;
    // ---------- data in memory ----------
    for (int i = 0; i < NINFO; i++) begin info[i] = 1'($urandom); mwrite(A_INFO + i, 32'(info[i])); end
    for (int i = 0; i < 6; i++) mwrite(A_SCR + NINFO + i, 0);            // tail bits
    for (int v = 0; v < 16; v++) mwrite(A_LUT + v, {16'(lev[(v >> 2) & 3] * U), 16'(lev[v & 3] * U)});
    for (int i = 0; i < 8; i++) begin
      x_val[i] = (i == 0) ? 32'd1 : 32'($urandom_range(1, 65535));
      mwrite(A_RX + i, x_val[i]);
    end
    for (int i = 0; i < 64; i++) mwrite(1024 + 600 + i, $urandom);       // CONV operands

    // ---------- firmware ----------
    // receive front end: FIR taps 0.5 and 0.25, circular buffer at 0, 64 words
    cfgw(8'h80, 0); cfgw(8'h81, 0); cfgw(8'h82, 32'h0000_4000); cfgw(8'h82, 32'h0000_2000);
    cfgw(8'h90, 0); cfgw(8'h91, 64); cfgw(8'h92, 1);
    // VMUL into bank 0 while samples arrive: receive writes collide
    agu(0, 1600, 64); agu(1, 1632, 64); agu(2, 200, 64);
    emit(I(OP_SETN, 0, 0, 0, 60));
    emit(I(OP_VMUL, 0, 0, 1, 2));
    delay(400);                                   // let the radio stream finish
    cfgw(8'h92, 0);
    agu(3, 0, 64);
    emit(I(OP_SETN, 0, 0, 0, 64));
    emit(I(OP_ENERGY, 1, 3, 0, 0, 0, 1));
    emit(I(OP_MOVACC, 1, 1, 0, 16));
    agu(3, A_RES, 16);
    emit(I(OP_ST, 1, 3));                         // A_RES + 0
    // transmit: scrambler (802.11, seed 0x5d) while the core correlates in bank 1
    cfgw(8'h30, 0); cfgw(8'h31, 32'h48); cfgw(8'h32, 7); cfgw(8'h33, 32'h5d);
    dma(A_INFO, A_SCR, NINFO, 3, 1, 0);
    agu(0, 1600, 64); agu(1, 1632, 32);
    emit(I(OP_SETN, 0, 0, 0, 64));
    emit(I(OP_CONV, 2, 0, 1, 0, 0, 1));
    emit(I(OP_WAITD));
    emit(I(OP_MOVACC, 2, 2, 0, 15));
    emit(I(OP_ST, 2, 3));                         // A_RES + 1
    // convolutional code and interleaver (16-QAM, 192 coded bits)
    cfgw(8'h42, 0);
    dma(A_SCR, A_COD, NSTEP, 4, 1);
    cfgw(8'h20, 0); cfgw(8'h21, NCB); cfgw(8'h22, 4); cfgw(8'h23, 2); cfgw(8'h24, 4);
    dma(A_COD, A_ILV, NSTEP, 2, 1);
    // mapping by table look-up
    agu(0, A_ILV, 48); agu(1, A_SYM, 48);
    emit(I(OP_SETC, 0, 0, 0, 48));
    emit(I(OP_LD, 1, 0));
    emit(I(OP_LUT, 2, 1, 0, A_LUT));
    emit(I(OP_ST, 2, 1));
    emit(I(OP_DBNZ, 0, 0, 0, prog.size() - 3));
    // the same labels through the mapper accelerator (16-QAM table)
    cfgw(8'h70, 2); cfgw(8'h71, 0);
    for (int v = 0; v < 4; v++) cfgw(8'h72, 32'(lev[v] * U));
    dma(A_ILV, A_MAP, 48, 7, 1);
    // symbols to the DAC
    dma(A_SYM, 0, 48, 6, 0);
    // the same symbols again, shaped by the filter turned to transmit
    cfgw(8'h83, 1);
    dma(A_SYM, 0, 48, 6, 0);
    cfgw(8'h83, 0);
    // receive chain
    cfgw(8'h10, 2); cfgw(8'h11, U);
    dma(A_SYM, A_DEM, 48, 1, 1);
    cfgw(8'h20, 1); cfgw(8'h21, NCB); cfgw(8'h22, 4); cfgw(8'h23, 4); cfgw(8'h24, 2);
    dma(A_DEM, A_DIL, 48, 2, 1);
    dma(A_DIL, A_DEC, NSTEP, 5, 1);
    cfgw(8'h33, 32'h5d);
    dma(A_DEC, A_DSC, NINFO, 3, 1);
    // CRC-32 over the information bits
    cfgw(8'h30, 1); cfgw(8'h31, 32'h04C11DB7); cfgw(8'h32, 32); cfgw(8'h33, 32'hffff_ffff);
    dma(A_INFO, A_CRC, NINFO, 3, 1);
    // 1/x
    dma(A_RX, A_RY, 8, 0, 1);
    emit(I(OP_HALT));

    $display("program words %0d", prog.size());
    checks++; if (prog.size() > 256) begin failures++; $display("FAIL program too long %0d", prog.size()); end
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk); im_we = 1; im_addr = 8'(i); im_data = prog[i];
    end
    @(negedge clk); im_we = 0; start = 1;
    @(negedge clk); start = 0;
    // radio samples: 150 samples, one per cycle
    for (int t = 0; t < 150; t++) begin
      adc_valid = 1; adc_data = {16'($signed($urandom_range(0, 8000)) - 4000), 16'($signed($urandom_range(0, 8000)) - 4000)};
      last_adc = adc_data;
      @(negedge clk);
    end
    adc_valid = 0;
    t0 = 0;
    while (!halted && t0 < 60000) begin @(negedge clk); t0++; end
    checks++; if (!halted) begin failures++; $display("FAIL program did not halt"); end
    $display("program ran %0d cycles after the radio burst", t0);

    // ---------- receive buffer and energy ----------
    energy = 0;
    for (int i = 0; i < 64; i++) begin
      mread(i, d);
      energy += longint'($signed(d[15:0])) * $signed(d[15:0]) + longint'($signed(d[31:16])) * $signed(d[31:16]);
    end
    expect_eq(A_RES, {16'h0, 16'(energy >>> 16)}, "ENERGY of receive buffer");
    // ---------- transmit chain ----------
    st = 7'h5d;
    for (int i = 0; i < NINFO; i++) begin
      logic fb;
      fb = st[6] ^ st[3];
      scr[i] = info[i] ^ fb;
      st = {st[5:0], fb};
      expect_eq(A_SCR + i, 32'(scr[i]), "scrambled");
    end
    sr = 0;
    for (int i = 0; i < NSTEP; i++) begin
      code[i] = enc(sr, (i < NINFO) ? scr[i] : 1'b0);
      coded[2 * i] = code[i][0]; coded[2 * i + 1] = code[i][1];
      expect_eq(A_COD + i, 32'(code[i]), "coded");
    end
    for (int k = 0; k < NCB; k++) ilv[jpos(k, NCB, 4)] = coded[k];
    for (int w = 0; w < 48; w++) begin
      logic [3:0] lab;
      lab = {ilv[4 * w + 3], ilv[4 * w + 2], ilv[4 * w + 1], ilv[4 * w]};
      expect_eq(A_ILV + w, 32'(lab), "interleaved");
      expect_eq(A_SYM + w, {16'(lev[lab[3:2]] * U), 16'(lev[lab[1:0]] * U)}, "mapped");
      expect_eq(A_MAP + w, {16'(lev[lab[3:2]] * U), 16'(lev[lab[1:0]] * U)}, "mapper accelerator");
      checks++;
      if (w >= dac_got.size() || dac_got[w] !== {16'(lev[lab[3:2]] * U), 16'(lev[lab[1:0]] * U)}) begin
        failures++; $display("FAIL DAC word %0d", w);
      end
      expect_eq(A_DEM + w, 32'(lab), "demapped");
    end
    // shaped transmit words: taps 0.5 and 0.25 over the symbol sequence; the
    // filter's previous input is the last receive sample
    prev_sym = last_adc;
    for (int w = 0; w < 48; w++) begin
      cplx_t cur;
      longint yr, yi;
      logic [3:0] lab;
      lab = {ilv[4 * w + 3], ilv[4 * w + 2], ilv[4 * w + 1], ilv[4 * w]};
      cur = {16'(lev[lab[3:2]] * U), 16'(lev[lab[1:0]] * U)};
      yr = 16384 + longint'(cur.re) * 16384 + longint'(prev_sym.re) * 8192;
      yi = 16384 + longint'(cur.im) * 16384 + longint'(prev_sym.im) * 8192;
      checks++;
      if (48 + w >= dac_got.size() || dac_got[48 + w] !== {16'(yi >>> 15), 16'(yr >>> 15)}) begin
        failures++; $display("FAIL shaped DAC word %0d", w);
      end
      prev_sym = cur;
    end
    // ---------- receive chain ----------
    for (int i = 0; i < NSTEP; i++) expect_eq(A_DIL + i, 32'(code[i]), "de-interleaved");
    for (int i = 0; i < NSTEP; i++) expect_eq(A_DEC + i, 32'((i < NINFO) ? scr[i] : 1'b0), "decoded");
    for (int i = 0; i < NINFO; i++) expect_eq(A_DSC + i, 32'(info[i]), "descrambled");
    crc = 32'hffff_ffff;
    for (int i = 0; i < NINFO; i++) begin
      logic fb;
      fb = info[i] ^ crc[31];
      crc = (crc << 1) ^ (fb ? 32'h04C11DB7 : 32'h0);
    end
    expect_eq(A_CRC, crc, "CRC-32");
    for (int i = 0; i < 8; i++) expect_eq(A_RY + i, 32'((64'd1 << 31) / x_val[i]), "1/x");

    // ---------- second run: filter bypass ----------
    prog.delete();
    cfgw(8'h92, 0); cfgw(8'h90, 64); cfgw(8'h91, 32); cfgw(8'h93, 1); cfgw(8'h92, 1);
    emit(I(OP_HALT));
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk); im_we = 1; im_addr = 8'(i); im_data = prog[i];
    end
    @(negedge clk); im_we = 0; start = 1;
    @(negedge clk); start = 0;
    t0 = 0;
    while (!halted && t0 < 1000) begin @(negedge clk); t0++; end
    checks++; if (!halted) begin failures++; $display("FAIL second program did not halt"); end
    for (int t = 0; t < 20; t++) begin
      raw_smp[t] = $urandom;
      adc_valid = 1; adc_data = raw_smp[t];
      @(negedge clk);
    end
    adc_valid = 0;
    for (int t = 0; t < 20; t++) expect_eq(64 + t, raw_smp[t], "unfiltered sample");
    checks++; if (rx_wptr != 20) begin failures++; $display("FAIL bypass write pointer %0d", rx_wptr); end

    // ---------- third run: RAKE receiver on the filtered path ----------
    prog.delete();
    cfgw(8'h92, 0); cfgw(8'h93, 0); cfgw(8'h90, 128); cfgw(8'h91, 32);
    cfgw(8'hb1, 0); cfgw(8'hb2, 0); cfgw(8'hb3, 32'h0000_4000);
    cfgw(8'hb1, 1); cfgw(8'hb2, 2); cfgw(8'hb3, 32'h2000_0000);
    cfgw(8'hb0, 1); cfgw(8'h92, 1);
    emit(I(OP_HALT));
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk); im_we = 1; im_addr = 8'(i); im_data = prog[i];
    end
    @(negedge clk); im_we = 0; start = 1;
    @(negedge clk); start = 0;
    t0 = 0;
    while (!halted && t0 < 1000) begin @(negedge clk); t0++; end
    checks++; if (!halted) begin failures++; $display("FAIL third program did not halt"); end
    rake_base = fir_hist.size();
    for (int t = 0; t < 24; t++) begin
      adc_valid = 1; adc_data = {16'($signed($urandom_range(0, 20000)) - 10000), 16'($signed($urandom_range(0, 20000)) - 10000)};
      @(negedge clk);
    end
    adc_valid = 0;
    repeat (4) @(negedge clk);
    for (int t = 0; t < 24; t++) begin
      cplx_t a, b;
      longint yr, yi;
      a = fir_hist[rake_base + t]; b = fir_hist[rake_base + t - 2];
      // 0.5 * a + 0.25j * b, rounded
      yr = 16384 + longint'(a.re) * 16384 - longint'(b.im) * 8192;
      yi = 16384 + longint'(a.im) * 16384 + longint'(b.re) * 8192;
      expect_eq(128 + t, {16'(yi >>> 15), 16'(yr >>> 15)}, "RAKE output");
    end

    // ---------- mechanisms ----------
    $display("mechanisms: dma refused %0d, radio overflow %0d, dac stalls %0d, WAITD stalls %0d, AGU wraps %0d, CMAC ops %0d, FIR outputs %0d, filter bypass writes %0d, RAKE chips %0d, shaped transmit words %0d",
             n_dma_refused, rx_overflows, n_dac_stall, n_waitd, n_wrap, n_cmac, n_fir, n_bypass, n_rake, n_shaped);
    $display("accelerator outputs: recip %0d demap %0d ilv %0d crc %0d conv %0d viterbi %0d mapper %0d, dac %0d",
             n_acc[0], n_acc[1], n_acc[2], n_acc[3], n_acc[4], n_acc[5], n_acc[7], dac_got.size());
    checks++; if (n_dma_refused == 0) begin failures++; $display("FAIL no DMA refusal"); end
    checks++; if (rx_overflows == 0) begin failures++; $display("FAIL no receive overflow"); end
    checks++; if (n_dac_stall == 0) begin failures++; $display("FAIL no DAC back-pressure"); end
    checks++; if (n_waitd == 0) begin failures++; $display("FAIL no WAITD stall"); end
    checks++; if (n_wrap == 0) begin failures++; $display("FAIL no modulo wrap"); end
    checks++; if (n_fir == 0) begin failures++; $display("FAIL no FIR output"); end
    checks++; if (n_bypass == 0) begin failures++; $display("FAIL no filter bypass"); end
    checks++; if (n_rake == 0) begin failures++; $display("FAIL no RAKE combining"); end
    checks++; if (n_shaped == 0) begin failures++; $display("FAIL filter never in transmit direction"); end
    for (int a = 0; a < 8; a++) begin
      if (a == 6) continue;   // the DAC port is counted on its own
      checks++; if (n_acc[a] == 0) begin failures++; $display("FAIL accelerator %0d unused", a); end
    end
    checks++; if (dac_got.size() != 96) begin failures++; $display("FAIL DAC words %0d", dac_got.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int a = 0; a < 8; a++) n_acc[a] = 0;
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
