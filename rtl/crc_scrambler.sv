// CRC / scrambler accelerator: one linear feedback shift register of up to 32
// bits with a configurable polynomial, processing one bit per word (bit 0).
//
// Scrambler mode (reg 0 = 0): additive (synchronous) scrambler, used for both
// scrambling and descrambling. With POLY holding one bit for each term x^k of
// the polynomial other than x^0 (bit k-1 for x^k), the feedback is
// fb = ^(state & POLY), the output bit is in ^ fb and the state shifts left
// taking fb in at bit 0. The IEEE 802.11 scrambler x^7 + x^4 + 1 is POLY = 0x48,
// LEN = 7.
// CRC mode (reg 0 = 1): MSB-first CRC register, fb = in ^ state[LEN-1],
// state = (state << 1) ^ (fb ? POLY : 0), where POLY holds the terms below
// x^LEN (CRC-32: 0x04C11DB7, LEN = 32). No word is output per bit; the word
// with in_last makes the unit output the final register value with out_last.
// Registers: 0 mode, 1 POLY, 2 LEN, 3 state (write loads the initial state).
// Stream timing: one bit per cycle, one cycle latency.
// The configurable CRC/scrambler polynomial is the document's; the register
// map and the two LFSR forms are this design's choices.
module crc_scrambler (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  logic [3:0]  cfg_addr,
  input  logic [31:0] cfg_data,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_data,
  input  logic        in_last,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_data,
  output logic        out_last
);
  logic        crc_mode;
  logic [31:0] poly, mask, state, nstate;
  logic [5:0]  len;
  logic        fb, obit;

  always_comb begin
    mask = (len >= 6'd32) ? 32'hffff_ffff : ((32'd1 << len) - 32'd1);
    if (crc_mode) begin
      fb     = in_data[0] ^ state[len[4:0] - 5'd1];
      nstate = ((state << 1) ^ (fb ? poly : 32'd0)) & mask;
      obit   = 1'b0;
    end else begin
      fb     = ^(state & poly);
      nstate = ((state << 1) | 32'(fb)) & mask;
      obit   = in_data[0] ^ fb;
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crc_mode <= 1'b0; poly <= 32'h48; len <= 6'd7; state <= 32'h7f;
      out_valid <= 1'b0; out_data <= '0; out_last <= 1'b0;
    end else begin
      if (cfg_we) begin
        case (cfg_addr)
          4'd0: crc_mode <= cfg_data[0];
          4'd1: poly     <= cfg_data;
          4'd2: len      <= cfg_data[5:0];
          4'd3: state    <= cfg_data;
          default: ;
        endcase
      end else if (in_ready) begin
        out_valid <= 1'b0;
        if (in_valid) begin
          state <= nstate;
          if (!crc_mode) begin
            out_valid <= 1'b1;
            out_data  <= 32'(obit);
            out_last  <= in_last;
          end else if (in_last) begin
            out_valid <= 1'b1;
            out_data  <= nstate;
            out_last  <= 1'b1;
          end
        end
      end
    end
  end
endmodule
