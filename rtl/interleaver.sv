// Block interleaver / de-interleaver accelerator for the IEEE 802.11a
// permutation, with its addressing computed in hardware.
//
// A block holds N_CBPS coded bits (48, 96, 192 or 288) and the modulation has
// N_BPSC bits per subcarrier (1, 2, 4, 6). The interleaver sends input bit k to
// output position
//   i = (N_CBPS/16) * (k mod 16) + floor(k/16)
//   j = s * floor(i/s) + (i + N_CBPS - floor(16 i / N_CBPS)) mod s,
//   s = max(N_BPSC/2, 1).
// Interleaving writes bit k of the block to buffer position j(k) and reads the
// buffer in order; de-interleaving writes in order and reads output bit k from
// position j(k). Input words carry K_IN bits, output words K_OUT bits (LSB
// first), so the unit also regroups bits, e.g. N_BPSC bits per subcarrier from
// the de-mapper into bit pairs for the Viterbi decoder. Up to 6 addresses are
// computed per cycle.
// Operation: fill (one input word per cycle) until N_CBPS bits are held, then
// drain (one output word per cycle), then the next block. in_last on the last
// input word of a block gives out_last on the last output word of that block.
// Configuration: reg 0 direction (0 interleave, 1 de-interleave), reg 1
// N_CBPS, reg 2 N_BPSC, reg 3 K_IN, reg 4 K_OUT. N_CBPS must be a multiple of
// 16, K_IN and K_OUT.
// The permutation is the one of the standard the document implements; the
// word format and the fill/drain organisation are this design's choices.
module interleaver #(
  parameter int unsigned NMAX = 288
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
  localparam int unsigned IW = $clog2(NMAX) + 1;

  logic          deint;
  logic [IW-1:0] ncbps;
  logic [2:0]    nbpsc, kin, kout;
  logic [NMAX-1:0] buffer;
  logic          draining, blk_last;
  logic [IW-1:0] cnt;

  function automatic logic [IW-1:0] perm(input logic [IW-1:0] k, input logic [IW-1:0] n,
                                         input logic [2:0] bpsc);
    logic [IW-1:0] s, i, t;
    s = (bpsc > 3'd1) ? IW'(bpsc >> 1) : IW'(1);
    i = IW'((n >> 4) * (k & IW'(15))) + (k >> 4);
    t = IW'((i + n - IW'({i, 4'b0000} / {4'b0000, n})) % s);
    return IW'(s * (i / s)) + t;
  endfunction

  logic [IW-1:0] pa [6];    // permuted addresses of the 6 bits handled this cycle
  always_comb begin
    for (int b = 0; b < 6; b++) pa[b] = perm(cnt + IW'(b), ncbps, nbpsc);
  end

  assign in_ready  = !draining;
  assign out_valid = draining;
  assign out_last  = draining && blk_last && (cnt + IW'(kout) >= ncbps);

  always_comb begin
    out_data = '0;
    for (int b = 0; b < 6; b++) begin
      if (b < int'(kout))
        out_data[b] = deint ? buffer[pa[b]] : buffer[cnt + IW'(b)];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      deint <= 1'b0; ncbps <= IW'(48); nbpsc <= 3'd1; kin <= 3'd1; kout <= 3'd1;
      buffer <= '0; draining <= 1'b0; blk_last <= 1'b0; cnt <= '0;
    end else begin
      if (cfg_we) begin
        case (cfg_addr)
          4'd0: deint <= cfg_data[0];
          4'd1: ncbps <= IW'(cfg_data);
          4'd2: nbpsc <= cfg_data[2:0];
          4'd3: kin   <= cfg_data[2:0];
          4'd4: kout  <= cfg_data[2:0];
          default: ;
        endcase
        draining <= 1'b0;
        cnt <= '0;
      end else if (!draining) begin
        if (in_valid) begin
          for (int b = 0; b < 6; b++) begin
            if (b < int'(kin))
              buffer[deint ? cnt + IW'(b) : pa[b]] <= in_data[b];
          end
          if (cnt + IW'(kin) >= ncbps) begin
            draining <= 1'b1;
            cnt      <= '0;
            blk_last <= in_last;
          end else begin
            cnt <= cnt + IW'(kin);
          end
        end
      end else if (out_ready) begin
        if (cnt + IW'(kout) >= ncbps) begin
          draining <= 1'b0;
          cnt      <= '0;
        end else begin
          cnt <= cnt + IW'(kout);
        end
      end
    end
  end
endmodule
