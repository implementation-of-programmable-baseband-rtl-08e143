// Viterbi decoder accelerator: hard-decision decoding of the rate 1/2, K = 7
// convolutional code produced by conv_encoder, using add-compare-select (ACS).
//
// Trellis: the state is the last six input bits {d1..d6} (d1 in bit 5). From
// state p the input u gives the register {u, p}, the code bits
// A = ^({u,p} & G0), B = ^({u,p} & G1) and the next state {u, p[5:1]}. State n
// therefore has the predecessors {n[4:0], 0} and {n[4:0], 1}, both reached with
// the input bit n[5].
// Decoding: each input word carries one received pair {B, A} in bits [1:0].
// In one cycle all 64 ACS units add the Hamming branch metric to the two
// predecessor path metrics, keep the smaller (ties to predecessor 0) and store
// the 64 decision bits in the survivor memory. Path metrics are PMW-bit
// unsigned numbers compared modulo 2^PMW, so they never need rescaling. The
// trellis starts in state 0. After the word marked in_last the decoder traces
// back from state 0 (the code is terminated by six zero tail bits), one step
// per cycle, and then outputs the decoded bits, tail bits included, one bit per
// word in order with out_last on the final one. A block holds at most MAXLEN
// steps; longer blocks are not supported.
// Registers: 0 G0, 1 G1 (same layout as conv_encoder).
// ACS decoding is the document's; hard decisions, block-wise traceback from the
// zero state and all sizes are this design's choices.
module viterbi #(
  parameter int unsigned MAXLEN = 256,
  parameter int unsigned PMW    = 10
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
  localparam int unsigned LW = $clog2(MAXLEN + 1);
  localparam int unsigned IW = $clog2(MAXLEN);

  typedef enum logic [1:0] {V_ACS, V_TRACE, V_OUT} vstate_e;
  vstate_e vst;

  logic [6:0]     g0, g1;
  logic [PMW-1:0] pm   [64];
  logic [PMW-1:0] pm_n [64];
  logic [63:0]    dec_n;
  logic [63:0]    surv [MAXLEN];
  logic [MAXLEN-1:0] bits;
  logic [LW-1:0]  len, tcnt, ocnt;
  logic [5:0]     tstate;
  logic [63:0]    trow;

  function automatic logic [1:0] code(input logic [6:0] r, input logic [6:0] a, input logic [6:0] b);
    return {^(r & b), ^(r & a)};
  endfunction

  // 64 ACS units
  always_comb begin
    for (int n = 0; n < 64; n++) begin
      logic [5:0]     p0, p1;
      logic [1:0]     c0, c1, rx;
      logic [PMW-1:0] m0, m1, diff;
      p0 = {n[4:0], 1'b0};
      p1 = {n[4:0], 1'b1};
      rx = in_data[1:0];
      c0 = code({n[5], p0}, g0, g1) ^ rx;
      c1 = code({n[5], p1}, g0, g1) ^ rx;
      m0 = pm[p0] + PMW'(c0[0]) + PMW'(c0[1]);
      m1 = pm[p1] + PMW'(c1[0]) + PMW'(c1[1]);
      diff = m1 - m0;                 // modulo comparison
      dec_n[n] = diff[PMW-1] && (diff != '0);
      pm_n[n]  = dec_n[n] ? m1 : m0;
    end
  end

  assign in_ready  = (vst == V_ACS);
  assign out_valid = (vst == V_OUT);
  assign out_data  = 32'(bits[IW'(ocnt)]);
  assign out_last  = (vst == V_OUT) && (ocnt + LW'(1) == len);

  logic          tvalid;   // trow holds the survivor row of step tcnt
  logic [IW-1:0] raddr;
  assign raddr = (vst == V_TRACE && tvalid && tcnt != '0) ? IW'(tcnt - LW'(1)) : IW'(tcnt);

  always_ff @(posedge clk) begin
    if (vst == V_ACS && in_valid) surv[IW'(len)] <= dec_n;
    trow <= surv[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vst <= V_ACS; g0 <= 7'o133; g1 <= 7'o171;
      for (int s = 0; s < 64; s++) pm[s] <= (s == 0) ? '0 : PMW'(64);
      bits <= '0; len <= '0; tcnt <= '0; ocnt <= '0; tstate <= '0; tvalid <= 1'b0;
    end else begin
      if (cfg_we && cfg_addr == 4'd0) g0 <= cfg_data[6:0];
      if (cfg_we && cfg_addr == 4'd1) g1 <= cfg_data[6:0];
      case (vst)
        V_ACS: if (in_valid) begin
          for (int s = 0; s < 64; s++) pm[s] <= pm_n[s];
          len <= len + LW'(1);
          if (in_last) begin
            vst    <= V_TRACE;
            tcnt   <= len;          // index of the last step
            tstate <= '0;           // terminated trellis ends in state 0
            tvalid <= 1'b0;
          end
        end
        V_TRACE: begin
          tvalid <= 1'b1;
          if (tvalid) begin
            bits[IW'(tcnt)] <= tstate[5];
            tstate <= {tstate[4:0], trow[tstate]};
            if (tcnt == '0) begin
              vst  <= V_OUT;
              ocnt <= '0;
            end else begin
              tcnt <= tcnt - LW'(1);
            end
          end
        end
        V_OUT: if (out_ready) begin
          if (ocnt + LW'(1) == len) begin
            vst <= V_ACS;
            len <= '0;
            for (int s = 0; s < 64; s++) pm[s] <= (s == 0) ? '0 : PMW'(64);
          end
          ocnt <= ocnt + LW'(1);
        end
        default: vst <= V_ACS;
      endcase
    end
  end
endmodule
