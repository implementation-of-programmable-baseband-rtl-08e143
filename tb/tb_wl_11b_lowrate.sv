// Workload test: IEEE 802.11b low-rate reception (1 Mbit/s, BPSK with the
// 11-chip Barker code) on the whole processor at its default sizes.
//
// The testbench sends 16 symbols of 11 chips through a two-path channel: a
// direct path and an echo of half the amplitude, rotated by j, three chips
// later. One chip arrives every 14 cycles, i.e. 11 Mchip/s at a 154 MHz clock.
// On the receive path the filter (one tap of 1/2) feeds the RAKE receiver. The
// RAKE is set to combine the direct path (delay 0, weight 1/2) with the echo
// (delay 3, weight -j/4). The receive port writes the combined chips into a
// circular buffer. Firmware then de-spreads each symbol with one 11-tap complex
// convolution of the chips with the Barker code (implied modulo addressing on
// the code), a move of the accumulator and a store.
// Checked: every RAKE output against a model computed from the filter output;
// every buffered chip; every correlation against a model computed from the
// chips; every bit decision; and the de-spreading cost against the 154 cycles
// available per 1 us symbol.
module tb_wl_11b_lowrate;
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

  task automatic agu(int a, int base, int len);
    emit(I(OP_SETAGU, 0, a, 0, base)); emit(I(OP_SETAGU, 0, a, 1, len));
    emit(I(OP_SETAGU, 0, a, 2, 0));
  endtask
  task automatic run_program(output int cycles);
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk); im_we = 1; im_addr = 8'(i); im_data = prog[i];
    end
    @(negedge clk); im_we = 0; start = 1;
    @(negedge clk); start = 0;
    cycles = 0;
    while (!halted && cycles < 20000) begin @(negedge clk); cycles++; end
    checks++; if (!halted) begin failures++; $display("FAIL program did not halt"); end
    prog.delete();
  endtask

  // RAKE outputs as they leave the unit
  cplx_t rake_out [$], fir_out [$];
  always @(posedge clk) if (rst_n && dut.rake_valid) rake_out.push_back(cplx_t'(dut.rake_data));
  always @(posedge clk) if (rst_n && dut.fir_valid) fir_out.push_back(cplx_t'(dut.fir_data));

  localparam int NSYM = 16, NCH = 11 * NSYM, CHIP_CYCLES = 14, SYM_CYCLES = 154, A = 2000;
  localparam int A_BUF = 0, A_BARK = 1024, A_OUT = 2048;
  int barker [11] = '{1, -1, 1, 1, -1, 1, 1, 1, -1, -1, -1};

  initial begin
    logic bits [NSYM];
    int chip [NCH];
    int cyc;
    logic [31:0] w;

    repeat (3) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 11; k++) mwrite(A_BARK + k, 32'(16'(barker[k] * 32767)));

    // ---------- receive set-up ----------
    cfgw(8'h80, 0); cfgw(8'h81, 0); cfgw(8'h82, 32'h0000_4000);
    cfgw(8'hb1, 0); cfgw(8'hb2, 0); cfgw(8'hb3, 32'h0000_4000);
    cfgw(8'hb1, 1); cfgw(8'hb2, 3); cfgw(8'hb3, 32'hE000_0000);
    cfgw(8'hb0, 1);
    cfgw(8'h90, A_BUF); cfgw(8'h91, 256); cfgw(8'h92, 1);
    emit(I(OP_HALT));
    run_program(cyc);

    // ---------- air: BPSK symbols spread by the Barker code, two paths ----------
    for (int s = 0; s < NSYM; s++) begin
      bits[s] = 1'($urandom);
      for (int k = 0; k < 11; k++) chip[11 * s + k] = (bits[s] ? -A : A) * barker[k];
    end
    for (int n = 0; n < NCH; n++) begin
      int xi;
      xi = (n >= 3) ? chip[n - 3] / 2 : 0;
      @(negedge clk); adc_valid = 1; adc_data = {16'(xi), 16'(chip[n])};
      @(negedge clk); adc_valid = 0;
      repeat (CHIP_CYCLES - 2) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (rake_out.size() != NCH) begin failures++; $display("FAIL %0d RAKE outputs", rake_out.size()); end
    checks++;
    if (rx_wptr != AW'(NCH)) begin failures++; $display("FAIL write pointer %0d", rx_wptr); end
    // RAKE model on the filter outputs: 1/2 * f[n] - j/4 * f[n-3], rounded
    for (int n = 0; n < NCH && n < rake_out.size() && n < fir_out.size(); n++) begin
      longint yr, yi;
      int f3r, f3i;
      f3r = (n >= 3) ? int'(fir_out[n - 3].re) : 0;
      f3i = (n >= 3) ? int'(fir_out[n - 3].im) : 0;
      yr = 16384 + longint'(fir_out[n].re) * 16384 + longint'(f3i) * 8192;
      yi = 16384 + longint'(fir_out[n].im) * 16384 - longint'(f3r) * 8192;
      checks++;
      if (rake_out[n] !== {16'(yi >>> 15), 16'(yr >>> 15)}) begin
        failures++; $display("FAIL RAKE chip %0d got %h", n, rake_out[n]);
      end
      expect_eq(A_BUF + n, 32'(rake_out[n]), "buffered chip");
    end

    // ---------- de-spreading firmware ----------
    agu(0, A_BUF, NCH); agu(1, A_BARK, 11); agu(3, A_OUT, NSYM);
    emit(I(OP_SETN, 0, 0, 0, 11));
    emit(I(OP_SETC, 0, 0, 0, NSYM));
    emit(I(OP_CONV, 2, 0, 1, 0));
    prog[prog.size() - 1][25] = 1'b1;              // clear the accumulator first
    emit(I(OP_MOVACC, 2, 2, 0, 15));
    emit(I(OP_ST, 2, 3));
    emit(I(OP_DBNZ, 0, 0, 0, prog.size() - 3));
    emit(I(OP_HALT));
    run_program(cyc);
    $display("de-spreading: %0d cycles for %0d symbols, %0d per symbol (available %0d)",
             cyc, NSYM, cyc / NSYM, SYM_CYCLES);
    checks++;
    if (cyc > NSYM * SYM_CYCLES) begin failures++; $display("FAIL de-spreading slower than the symbol rate"); end

    for (int s = 0; s < NSYM; s++) begin
      longint sr, si;
      int er, ei, gr, gi;
      sr = 0; si = 0;
      for (int k = 0; k < 11 && 11 * s + k < rake_out.size(); k++) begin
        sr += longint'(rake_out[11 * s + k].re) * barker[k] * 32767;
        si += longint'(rake_out[11 * s + k].im) * barker[k] * 32767;
      end
      er = int'(sr >>> 15); ei = int'(si >>> 15);
      mread(A_OUT + s, w);
      gr = int'($signed(w[15:0])); gi = int'($signed(w[31:16]));
      checks++;
      if (gr - er > 1 || er - gr > 1 || gi - ei > 1 || ei - gi > 1) begin
        failures++; $display("FAIL symbol %0d correlation %0d,%0d expected %0d,%0d", s, gr, gi, er, ei);
      end
      checks++;
      if ((gr < 0) != bits[s]) begin failures++; $display("FAIL symbol %0d decision", s); end
    end
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
