// Configurable FIR filter accelerator (receive anti-aliasing / transmit symbol
// shaping).
//
// Two data types, selected by configuration register 0:
//   mode 0, complex : y[n] = sum_k c[k] * x[n-k] with complex samples and
//                     complex coefficients (c = c.re + j c.im);
//   mode 1, dual    : two independent real filters, y.re from x.re with the
//                     coefficients c.re, y.im from x.im with c.im.
// Coefficients are Q1.15; each output is rounded, shifted right by 15 and
// saturated to 16 bits. All TAPS products are formed in parallel, so the filter
// takes one sample and gives one result per cycle.
// Configuration: reg 0 mode, reg 1 coefficient index, reg 2 coefficient data
// {im, re} (the index then advances by one).
// Stream: in_valid/in_ready and out_valid/out_ready, one output per input, one
// cycle of latency, in_last passed to out_last.
// The two data types are the document's; the tap count, the Q1.15 scaling and
// the register map are this design's choices.
module fir_filter
  import bbp_pkg::*;
#(
  parameter int unsigned TAPS = 16
) (
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
  localparam int unsigned TW = $clog2(TAPS);

  logic        mode_dual;
  logic [TW-1:0] cidx;
  cplx_t       coef [TAPS];
  cplx_t       dl   [TAPS];      // dl[0] is the newest sample
  cplx_t       x    [TAPS];      // delay line including the incoming sample
  logic signed [39:0] acc_re, acc_im;

  always_comb begin
    x[0] = cplx_t'(in_data);
    for (int k = 1; k < TAPS; k++) x[k] = dl[k-1];
    acc_re = '0;
    acc_im = '0;
    for (int k = 0; k < TAPS; k++) begin
      if (mode_dual) begin
        acc_re += 40'(coef[k].re * x[k].re);
        acc_im += 40'(coef[k].im * x[k].im);
      end else begin
        acc_re += 40'(coef[k].re * x[k].re) - 40'(coef[k].im * x[k].im);
        acc_im += 40'(coef[k].re * x[k].im) + 40'(coef[k].im * x[k].re);
      end
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_dual <= 1'b0; cidx <= '0;
      out_valid <= 1'b0; out_data <= '0; out_last <= 1'b0;
      for (int k = 0; k < TAPS; k++) begin coef[k] <= '0; dl[k] <= '0; end
    end else begin
      if (cfg_we) begin
        case (cfg_addr)
          4'd0: mode_dual <= cfg_data[0];
          4'd1: cidx <= TW'(cfg_data);
          4'd2: begin coef[cidx] <= cplx_t'(cfg_data); cidx <= cidx + TW'(1); end
          default: ;
        endcase
      end
      if (in_ready) begin
        out_valid <= in_valid;
        if (in_valid) begin
          for (int k = 0; k < TAPS; k++) dl[k] <= x[k];
          out_data <= {sat16((acc_im + 40'sd16384) >>> 15), sat16((acc_re + 40'sd16384) >>> 15)};
          out_last <= in_last;
        end
      end
    end
  end
endmodule
