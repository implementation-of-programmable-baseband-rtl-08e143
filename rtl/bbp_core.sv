// Programmable baseband DSP core.
//
// The core runs a program from its instruction memory and executes the vector
// instructions that dominate baseband processing in one element per cycle:
//   CONV   complex convolution / correlation, acc += V1[i] * (conj) V2[i]
//   VMUL   complex vector product, V3[i] = V1[i] * (conj) V2[i]
//   ENERGY energy of a vector, acc += Re(V[i])^2 + Im(V[i])^2
//   ABS    approximate magnitude of a complex register
//   LD/ST  modulo (circular FIFO) memory access through an address generator
//   LUT    table look-up, REG2 <= mem[segment + REG1]
// plus a small ALU (complex add/subtract with saturation), accumulator moves,
// a hardware loop counter, writes to the configuration bus of the accelerators
// and a wait for the DMA manager. The instruction encoding is in bbp_pkg.
//
// Four address generators (AGU) each hold base, len, ptr and step; an access
// uses base + ptr and then advances ptr by step modulo len, which gives the
// implied modulo addressing of convolution and FIFO buffers without any
// instruction overhead. Vector operands come from two read ports of the SOCBUS
// (operand A on port 0, operand B on port 1) and go through the CMAC.
//
// Timing: scalar instructions take one cycle, LD and LUT two. A vector
// instruction of length N takes N + 2 cycles: one element is issued per cycle
// and two cycles drain the memory read and the CMAC stage, so its result is
// ready for the next instruction. VMUL results are rounded, shifted right by 15
// (Q1.15 product) and saturated to 16 bits before they are written.
// The instruction set list is the document's; the encoding, the register count,
// the AGU fields, the loop instruction and the rounding are this design's own.
module bbp_core
  import bbp_pkg::*;
#(
  parameter int unsigned AW      = 12,   // data address width (words)
  parameter int unsigned IM_DEPTH = 256  // instruction memory words
) (
  input  logic           clk,
  input  logic           rst_n,
  // program load and control
  input  logic           im_we,
  input  logic [$clog2(IM_DEPTH)-1:0] im_addr,
  input  logic [31:0]    im_data,
  input  logic           start,
  output logic           halted,
  // SOCBUS memory side
  output logic           cra_en,
  output logic [AW-1:0]  cra_addr,
  input  logic [31:0]    cra_data,
  output logic           crb_en,
  output logic [AW-1:0]  crb_addr,
  input  logic [31:0]    crb_data,
  output logic           cw_en,
  output logic [AW-1:0]  cw_addr,
  output logic [31:0]    cw_data,
  // SOCBUS configuration side
  output logic           cfg_we,
  output logic [7:0]     cfg_addr,
  output logic [31:0]    cfg_data,
  input  logic           dma_busy
);
  localparam int unsigned PW = $clog2(IM_DEPTH);

  typedef enum logic [2:0] {S_IDLE, S_RUN, S_LDW, S_VEC, S_DRAIN, S_HALT} state_e;
  state_e state;

  logic [31:0]   imem [IM_DEPTH];
  logic [PW-1:0] pc;
  instr_t        ir;
  cplx_t         r [8];
  logic [AW-1:0] agu_base [4], agu_len [4], agu_ptr [4], agu_step [4];
  logic [15:0]   vlen, vcnt, lcnt;
  logic [1:0]    drain;
  instr_t        vir;      // vector instruction being executed
  logic [2:0]    ld_rd;

  always_ff @(posedge clk) if (im_we) imem[im_addr] <= im_data;
  assign ir = instr_t'(imem[pc]);

  function automatic logic [AW-1:0] agu_addr(input logic [1:0] k);
    return agu_base[k] + agu_ptr[k];
  endfunction
  function automatic logic [AW-1:0] agu_next(input logic [1:0] k);
    logic [AW:0] s;
    s = {1'b0, agu_ptr[k]} + {1'b0, agu_step[k]};
    return (s >= {1'b0, agu_len[k]}) ? AW'(s - {1'b0, agu_len[k]}) : AW'(s);
  endfunction

  // ---------------- vector element pipeline ----------------
  logic        issue;          // an element is issued this cycle
  instr_t      iss_ir;         // instruction driving this issue
  logic        d1_valid, d1_acc, d1_clr, d1_conj, d1_wr;
  logic [1:0]  d1_sel;
  logic [AW-1:0] d1_waddr, d2_waddr;
  logic        d2_wr;
  logic signed [31:0] xr, xi, acc_re, acc_im;
  logic        x_valid;
  cplx_t       a_op, b_op;

  always_comb begin
    iss_ir = (state == S_VEC) ? vir : ir;
    issue  = (state == S_VEC) ||
             (state == S_RUN && (ir.op == OP_CONV || ir.op == OP_VMUL || ir.op == OP_ENERGY));
  end

  assign a_op = cplx_t'(cra_data);
  assign b_op = cplx_t'(crb_data);

  logic d1_energy;
  cmac #(.N(16), .NACC(4)) u_cmac (
    .clk, .rst_n,
    .in_valid(d1_valid),
    .ar(a_op.re), .ai(a_op.im),
    .br(d1_energy ? a_op.re : b_op.re), .bi(d1_energy ? a_op.im : b_op.im),
    .conj(d1_conj), .acc_en(d1_acc), .clr(d1_clr), .acc_sel(d1_sel),
    .out_valid(x_valid), .xr, .xi,
    .rd_sel(ir.rs[1:0]), .acc_re, .acc_im);

  function automatic logic signed [15:0] rnd_q15(input logic signed [31:0] v);
    return sat16(40'(v + 32'sd16384) >>> 15);
  endfunction

  // ---------------- memory ports (combinational) ----------------
  always_comb begin
    cra_en = 1'b0; cra_addr = '0;
    crb_en = 1'b0; crb_addr = '0;
    cw_en  = 1'b0; cw_addr  = '0; cw_data = '0;
    cfg_we = 1'b0; cfg_addr = '0; cfg_data = '0;
    if (issue) begin
      cra_en = 1'b1; cra_addr = agu_addr(iss_ir.rs[1:0]);
      if (iss_ir.op != OP_ENERGY) begin
        crb_en = 1'b1; crb_addr = agu_addr(iss_ir.rt[1:0]);
      end
    end else if (state == S_RUN) begin
      case (ir.op)
        OP_LD:  begin cra_en = 1'b1; cra_addr = agu_addr(ir.rs[1:0]); end
        OP_LUT: begin cra_en = 1'b1; cra_addr = AW'(ir.imm) + AW'(r[ir.rs].re); end
        OP_ST:  begin cw_en = 1'b1; cw_addr = agu_addr(ir.rs[1:0]); cw_data = r[ir.rd]; end
        OP_OUT: begin cfg_we = 1'b1; cfg_addr = ir.imm[7:0]; cfg_data = r[ir.rs]; end
        default: ;
      endcase
    end
    if (x_valid && d2_wr) begin
      cw_en = 1'b1; cw_addr = d2_waddr;
      cw_data = {rnd_q15(xi), rnd_q15(xr)};
    end
  end

  logic [16:0] mag;
  abs_approx #(.N(16)) u_abs (.re(r[ir.rs].re), .im(r[ir.rs].im), .mag);

  // ---------------- sequencer ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; pc <= '0; vlen <= 16'd1; vcnt <= '0; lcnt <= '0; drain <= '0;
      vir <= '0; ld_rd <= '0;
      d1_valid <= 1'b0; d1_acc <= 1'b0; d1_clr <= 1'b0; d1_conj <= 1'b0; d1_wr <= 1'b0;
      d1_sel <= '0; d1_waddr <= '0; d2_waddr <= '0; d2_wr <= 1'b0; d1_energy <= 1'b0;
      for (int k = 0; k < 8; k++) r[k] <= '0;
      for (int k = 0; k < 4; k++) begin
        agu_base[k] <= '0; agu_len[k] <= '1; agu_ptr[k] <= '0; agu_step[k] <= AW'(1);
      end
    end else begin
      // element pipeline registers
      d1_valid  <= issue;
      d1_energy <= issue && iss_ir.op == OP_ENERGY;
      d1_conj   <= iss_ir.conj || iss_ir.op == OP_ENERGY;
      d1_acc    <= issue && iss_ir.op != OP_VMUL;
      d1_wr     <= issue && iss_ir.op == OP_VMUL;
      d1_sel    <= iss_ir.rd[1:0];
      // clear only on the first element of an instruction with clr set
      d1_clr    <= issue && iss_ir.clr && state == S_RUN;
      d1_waddr  <= agu_addr(iss_ir.imm[1:0]);
      d2_waddr  <= d1_waddr;
      d2_wr     <= d1_wr && d1_valid;
      if (issue) begin
        agu_ptr[iss_ir.rs[1:0]] <= agu_next(iss_ir.rs[1:0]);
        if (iss_ir.op == OP_CONV || iss_ir.op == OP_VMUL) begin
          if (iss_ir.rt[1:0] != iss_ir.rs[1:0])
            agu_ptr[iss_ir.rt[1:0]] <= agu_next(iss_ir.rt[1:0]);
        end
        if (iss_ir.op == OP_VMUL && iss_ir.imm[1:0] != iss_ir.rs[1:0] &&
            iss_ir.imm[1:0] != iss_ir.rt[1:0])
          agu_ptr[iss_ir.imm[1:0]] <= agu_next(iss_ir.imm[1:0]);
      end

      case (state)
        S_IDLE, S_HALT: if (start) begin state <= S_RUN; pc <= '0; end
        S_LDW: begin r[ld_rd] <= cplx_t'(cra_data); state <= S_RUN; end
        S_VEC: begin
          vcnt <= vcnt + 16'd1;
          if (vcnt + 16'd1 >= vlen) begin state <= S_DRAIN; drain <= 2'd1; end
        end
        S_DRAIN: begin
          if (drain == 2'd0) state <= S_RUN;
          drain <= drain - 2'd1;
        end
        S_RUN: begin
          pc <= pc + PW'(1);
          unique case (ir.op)
            OP_HALT:  begin state <= S_HALT; pc <= pc; end
            OP_LDIL:  r[ir.rd].re <= ir.imm;
            OP_LDIH:  r[ir.rd].im <= ir.imm;
            OP_SETAGU: case (agu_field_e'(ir.rt[1:0]))
                AGU_BASE: agu_base[ir.rs[1:0]] <= AW'(ir.imm);
                AGU_LEN:  agu_len[ir.rs[1:0]]  <= AW'(ir.imm);
                AGU_PTR:  agu_ptr[ir.rs[1:0]]  <= AW'(ir.imm);
                AGU_STEP: agu_step[ir.rs[1:0]] <= AW'(ir.imm);
              endcase
            OP_SETN:  vlen <= (ir.imm == 16'd0) ? 16'd1 : ir.imm;
            OP_CONV, OP_VMUL, OP_ENERGY: begin
              vir  <= ir;
              vcnt <= 16'd1;
              if (vlen <= 16'd1) begin state <= S_DRAIN; drain <= 2'd1; end
              else state <= S_VEC;
            end
            OP_ABS:   r[ir.rd] <= '{im: '0, re: (mag > 17'd32767) ? 16'sh7fff : mag[15:0]};
            OP_LD: begin
              ld_rd <= ir.rd; state <= S_LDW;
              agu_ptr[ir.rs[1:0]] <= agu_next(ir.rs[1:0]);
            end
            OP_LUT: begin ld_rd <= ir.rd; state <= S_LDW; end
            OP_ST:  agu_ptr[ir.rs[1:0]] <= agu_next(ir.rs[1:0]);
            OP_MOVACC: r[ir.rd] <= '{im: sat16(40'(acc_im) >>> ir.imm[4:0]),
                                     re: sat16(40'(acc_re) >>> ir.imm[4:0])};
            OP_ADD:   r[ir.rd] <= '{im: sat16(40'(r[ir.rs].im) + 40'(r[ir.rt].im)),
                                     re: sat16(40'(r[ir.rs].re) + 40'(r[ir.rt].re))};
            OP_SUB:   r[ir.rd] <= '{im: sat16(40'(r[ir.rs].im) - 40'(r[ir.rt].im)),
                                     re: sat16(40'(r[ir.rs].re) - 40'(r[ir.rt].re))};
            OP_WAITD: if (dma_busy) pc <= pc;
            OP_SETC:  lcnt <= ir.imm;
            OP_DBNZ:  begin
              lcnt <= lcnt - 16'd1;
              if (lcnt != 16'd1) pc <= PW'(ir.imm);
            end
            default: ;  // NOP and OUT act through the port logic above
          endcase
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign halted = (state == S_HALT);
endmodule
