// Mapper accelerator: turns one bit label per word into one complex
// constellation point per cycle by table look-up (BPSK, QPSK, 16-QAM, 64-QAM).
//
// The label layout is the de-mapper's: the first half of the k label bits
// (k = 1, 2, 4, 6) selects the in-phase level and the second half the
// quadrature level, each read as an unsigned index with the first bit as LSB:
//   BPSK   : I index = b0,          Q = 0
//   QPSK   : I index = b0,          Q index = b1
//   16-QAM : I index = b1 b0,       Q index = b3 b2
//   64-QAM : I index = b2 b1 b0,    Q index = b5 b4 b3
// Both axes use one table of eight signed 16-bit levels. Firmware loads the
// table for the modulation and the transmit gain in use, so any labelling and
// any scaling can be produced; the table is all zeros after reset.
// Registers: 0 modulation (0 BPSK, 1 QPSK, 2 16-QAM, 3 64-QAM), 1 table index,
// 2 table level (bits 15:0; the index then advances by one).
// Stream timing: one cycle latency, one symbol per cycle, in_last -> out_last,
// held while out_valid && !out_ready.
// Mapping by look-up table in an accelerator is the document's; the label
// layout, the shared per-axis table and the register map are this design's
// choices.
module mapper
  import bbp_pkg::*;
(
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
  logic [1:0]         mode;
  logic [2:0]         tidx;
  logic signed [15:0] level [8];
  logic [2:0]         ii, qi;
  cplx_t              pt;

  always_comb begin
    case (mode)
      2'd0:    begin ii = {2'b0, in_data[0]};   qi = '0;                  end
      2'd1:    begin ii = {2'b0, in_data[0]};   qi = {2'b0, in_data[1]}; end
      2'd2:    begin ii = {1'b0, in_data[1:0]}; qi = {1'b0, in_data[3:2]}; end
      default: begin ii = in_data[2:0];         qi = in_data[5:3];        end
    endcase
    pt.re = level[ii];
    pt.im = (mode == 2'd0) ? 16'sd0 : level[qi];
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode <= 2'd1; tidx <= '0;
      for (int k = 0; k < 8; k++) level[k] <= '0;
      out_valid <= 1'b0; out_data <= '0; out_last <= 1'b0;
    end else begin
      if (cfg_we) begin
        case (cfg_addr)
          4'd0: mode <= cfg_data[1:0];
          4'd1: tidx <= cfg_data[2:0];
          4'd2: begin level[tidx] <= cfg_data[15:0]; tidx <= tidx + 3'd1; end
          default: ;
        endcase
      end
      if (in_ready) begin
        out_valid <= in_valid;
        if (in_valid) begin
          out_data <= pt;
          out_last <= in_last;
        end
      end
    end
  end
endmodule
