// De-mapper accelerator: hard-decision demodulation of one BPSK, QPSK, 16-QAM
// or 64-QAM symbol per cycle with the Gray labelling of IEEE 802.11a.
//
// The received sample has its constellation points at odd multiples of UNIT
// (configuration register 1) on each axis, i.e. the levels are
// +-1, +-3, +-5, +-7 times UNIT. Per axis with value v:
//   first bit  : v >= 0
//   16-QAM     : second bit |v| < 2 UNIT
//   64-QAM     : second bit |v| < 4 UNIT, third bit | |v| - 4 UNIT | < 2 UNIT
// Output word bits [k-1:0] hold b0..b(k-1) with the in-phase bits first
// (k = 1, 2, 4, 6); the other bits are zero. Register 0 selects the
// modulation (0 BPSK, 1 QPSK, 2 16-QAM, 3 64-QAM).
// Stream timing: one cycle latency, one symbol per cycle, in_last -> out_last.
// The modulations and the one-result-per-cycle rate are the document's; the
// input scaling and the decision thresholds are this design's choices.
module demapper
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
  logic [1:0]  mode;
  logic [15:0] unit;
  cplx_t       s;
  logic [2:0]  bi, bq;
  logic [5:0]  bits;

  // decisions of one axis: {third bit, second bit (64-QAM), first bit},
  // plus the 16-QAM second bit in bit 3
  function automatic logic [3:0] axis(input logic signed [15:0] v, input logic [15:0] u);
    logic [17:0] a, two, four, d;
    a    = v[15] ? 18'(-18'(v)) : 18'(v);
    two  = {1'b0, u, 1'b0};
    four = {u, 2'b00};
    d    = (a >= four) ? a - four : four - a;
    return {a < two, d < two, a < four, !v[15]};
  endfunction

  logic [3:0] di, dq;
  always_comb begin
    s  = cplx_t'(in_data);
    di = axis(s.re, unit);
    dq = axis(s.im, unit);
    bi = di[2:0];
    bq = dq[2:0];
    case (mode)
      2'd0:    bits = {5'b0, bi[0]};
      2'd1:    bits = {4'b0, bq[0], bi[0]};
      2'd2:    bits = {2'b0, dq[3], bq[0], di[3], bi[0]};
      default: bits = {bq, bi};
    endcase
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode <= 2'd0; unit <= 16'd1024;
      out_valid <= 1'b0; out_data <= '0; out_last <= 1'b0;
    end else begin
      if (cfg_we && cfg_addr == 4'd0) mode <= cfg_data[1:0];
      if (cfg_we && cfg_addr == 4'd1) unit <= cfg_data[15:0];
      if (in_ready) begin
        out_valid <= in_valid;
        if (in_valid) begin
          out_data <= 32'(bits);
          out_last <= in_last;
        end
      end
    end
  end
endmodule
