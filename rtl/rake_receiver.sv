// RAKE receiver: combines up to FINGERS delayed copies (multipath echoes) of
// the received chip stream, each weighted by a complex coefficient, into one
// output chip per input chip.
//
// The last DMAX input samples are kept in a FIFO buffer (a shift register,
// newest first). Finger f takes the sample d_f chips old, multiplies it by its
// weight w_f (Q1.15, normally the conjugate of the estimated path gain) and
// the finger outputs are summed:
//   y[n] = sat16( round( sum_f w_f * x[n - d_f] ) >> 15 )
// Firmware estimates the path delays and gains (the core's correlation
// instructions suit that) and loads them. A finger with weight 0 is off. When
// the unit is disabled the input passes unchanged, so the same receive path
// serves modes that need no RAKE.
// Registers: 0 enable (bit 0), 1 finger number, 2 delay of that finger
// (0 .. DMAX-1 chips), 3 weight of that finger {im, re}. After reset the unit
// is disabled and all fingers have delay 0 and weight 0.
// Interface: in_valid/in_data from the receive filter, out_valid/out_data to
// the receive buffer; no back-pressure (the radio cannot wait).
// Timing: one chip per cycle, one cycle of latency.
// Four fingers and the FIFO-buffer-and-sum structure are the document's; the
// buffer depth, the weight format, the register map and the place in the
// receive path are this design's choices.
module rake_receiver
  import bbp_pkg::*;
#(
  parameter int unsigned FINGERS = 4,
  parameter int unsigned DMAX    = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  logic [3:0]  cfg_addr,
  input  logic [31:0] cfg_data,
  input  logic        in_valid,
  input  logic [31:0] in_data,
  output logic        out_valid,
  output logic [31:0] out_data
);
  localparam int unsigned DW_ = $clog2(DMAX);
  localparam int unsigned FW  = (FINGERS > 1) ? $clog2(FINGERS) : 1;

  logic             en;
  logic [FW-1:0]    fsel;
  logic [DW_-1:0]   delay  [FINGERS];
  cplx_t            weight [FINGERS];
  cplx_t            hist   [DMAX];     // hist[k] = x[n-1-k]
  cplx_t            win    [DMAX];     // win[k]  = x[n-k]
  cplx_t            y;

  always_comb begin
    logic signed [39:0] sr, si;
    cplx_t              xs;
    win[0] = cplx_t'(in_data);
    for (int k = 1; k < DMAX; k++) win[k] = hist[k-1];
    sr = 40'sd16384;   // rounding
    si = 40'sd16384;
    for (int f = 0; f < FINGERS; f++) begin
      xs = win[delay[f]];
      sr += 40'(xs.re * weight[f].re) - 40'(xs.im * weight[f].im);
      si += 40'(xs.re * weight[f].im) + 40'(xs.im * weight[f].re);
    end
    y.re = sat16(sr >>> 15);
    y.im = sat16(si >>> 15);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en <= 1'b0; fsel <= '0;
      for (int f = 0; f < FINGERS; f++) begin delay[f] <= '0; weight[f] <= '0; end
      for (int k = 0; k < DMAX; k++) hist[k] <= '0;
      out_valid <= 1'b0; out_data <= '0;
    end else begin
      if (cfg_we) begin
        case (cfg_addr)
          4'd0: en <= cfg_data[0];
          4'd1: fsel <= FW'(cfg_data);
          4'd2: delay[fsel] <= DW_'(cfg_data);
          4'd3: weight[fsel] <= cplx_t'(cfg_data);
          default: ;
        endcase
      end
      out_valid <= in_valid;
      if (in_valid) begin
        for (int k = 0; k < DMAX; k++) hist[k] <= win[k];
        out_data <= en ? 32'(y) : in_data;
      end
    end
  end
endmodule
