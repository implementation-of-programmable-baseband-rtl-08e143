// Shared types and constants of the programmable baseband processor.
//
// A data word is one complex sample: 16-bit two's complement real part in the low
// half and 16-bit imaginary part in the high half (Q1.15 when read as a fraction).
// Bit-level accelerators use the same 32-bit word and carry their bits LSB first.
// The instruction encoding of the core, the unit numbers on the configuration
// bus and the accelerator numbers used by the DMA manager are defined here; all of
// them are this design's own choices.
package bbp_pkg;

  localparam int unsigned DW = 32;   // data word
  localparam int unsigned CW = 16;   // one real component

  typedef struct packed {
    logic signed [CW-1:0] im;
    logic signed [CW-1:0] re;
  } cplx_t;

  // ---------------- core instruction set ----------------
  typedef enum logic [4:0] {
    OP_NOP    = 5'd0,
    OP_HALT   = 5'd1,
    OP_LDIL   = 5'd2,   // rd.re <= imm16
    OP_LDIH   = 5'd3,   // rd.im <= imm16
    OP_SETAGU = 5'd4,   // agu[ra].field(rb) <= imm16
    OP_SETN   = 5'd5,   // vector length <= imm16
    OP_CONV   = 5'd6,   // acc[rd] (+)= sum mem[aguA] * (conj) mem[aguB]
    OP_VMUL   = 5'd7,   // mem[aguC] <= mem[aguA] * (conj) mem[aguB]
    OP_ENERGY = 5'd8,   // acc[rd] (+)= sum |mem[aguA]|^2
    OP_ABS    = 5'd9,   // rd <= approx |rs|
    OP_LD     = 5'd10,  // rd <= mem[aguA]   (modulo FIFO read)
    OP_ST     = 5'd11,  // mem[aguA] <= rs   (modulo FIFO write)
    OP_LUT    = 5'd12,  // rd <= mem[imm + rs.re]
    OP_MOVACC = 5'd13,  // rd <= acc[rs] >>> imm (saturated to 16 bits)
    OP_ADD    = 5'd14,  // rd <= rs + rt (component-wise, saturated)
    OP_SUB    = 5'd15,  // rd <= rs - rt
    OP_OUT    = 5'd16,  // configuration bus write: addr imm[7:0], data rs
    OP_WAITD  = 5'd17,  // wait until the DMA manager is idle
    OP_SETC   = 5'd18,  // loop counter <= imm16
    OP_DBNZ   = 5'd19   // loop counter--, branch to imm if it was not 1
  } opcode_e;

  // Instruction word: [31:27] opcode, [26] conj, [25] clear accumulator,
  // [24:22] rd, [21:19] rs / aguA, [18:16] rt / aguB, [15:0] imm16
  // (VMUL takes aguC from imm[1:0]; SETAGU takes its field from rt).
  typedef struct packed {
    opcode_e     op;
    logic        conj;
    logic        clr;
    logic [2:0]  rd;
    logic [2:0]  rs;
    logic [2:0]  rt;
    logic [15:0] imm;
  } instr_t;

  typedef enum logic [1:0] {AGU_BASE = 2'd0, AGU_LEN = 2'd1, AGU_PTR = 2'd2, AGU_STEP = 2'd3} agu_field_e;

  // ---------------- configuration bus ----------------
  // cfg_addr[7:4] selects the unit, cfg_addr[3:0] one of its registers.
  localparam logic [3:0] UNIT_RECIP  = 4'd0;
  localparam logic [3:0] UNIT_DEMAP  = 4'd1;
  localparam logic [3:0] UNIT_ILV    = 4'd2;
  localparam logic [3:0] UNIT_CRC    = 4'd3;
  localparam logic [3:0] UNIT_CONV   = 4'd4;
  localparam logic [3:0] UNIT_VIT    = 4'd5;
  localparam logic [3:0] UNIT_MAP    = 4'd7;
  localparam logic [3:0] UNIT_FIR    = 4'd8;
  localparam logic [3:0] UNIT_RADIO  = 4'd9;
  localparam logic [3:0] UNIT_DMA    = 4'd10;
  localparam logic [3:0] UNIT_RAKE   = 4'd11;

  // Accelerator numbers seen by the DMA manager (same as the unit numbers);
  // number 6 is the transmit port towards the DAC.
  localparam int unsigned NUM_ACC = 8;
  localparam logic [2:0] ACC_DAC = 3'd6;

  // Saturate a wide signed value to CW bits.
  function automatic logic signed [CW-1:0] sat16(input logic signed [39:0] v);
    if (v > 40'sd32767)       return 16'sh7fff;
    else if (v < -40'sd32768) return 16'sh8000;
    else                      return v[CW-1:0];
  endfunction

endpackage
