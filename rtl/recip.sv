// 1/x accelerator: a fully pipelined restoring divider that returns
// q = floor(2^31 / x) for the unsigned 16-bit x in in_data[15:0]
// (x = 0 returns all ones). One quotient bit is decided per stage, so after
// a latency of 32 cycles it gives one result per cycle. The whole pipeline
// holds while the output is valid and not taken (out_valid && !out_ready).
// in_last travels with its operand to out_last. No configuration registers.
// The one-result-per-cycle rate is the document's; the number format and the
// pipelined long division are this design's choices.
module recip #(
  parameter int unsigned XW = 16,
  parameter int unsigned QW = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_data,
  input  logic        in_last,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_data,
  output logic        out_last
);
  // stage s holds the partial remainder and quotient after s+1 bits
  logic          v   [QW];
  logic          l   [QW];
  logic [XW-1:0] d   [QW];
  logic [XW:0]   rem [QW];
  logic [QW-1:0] q   [QW];
  logic          adv;

  assign adv      = !v[QW-1] || out_ready;
  assign in_ready = adv;

  // one restoring step; the dividend is 2^31, so only its top bit is one
  function automatic logic [XW+QW:0] step(input logic [XW:0] r_in, input logic [QW-1:0] q_in,
                                          input logic [XW-1:0] dv, input logic dbit);
    logic [XW+1:0] t;
    t = {r_in, dbit};
    if (t >= {2'b00, dv}) return {(XW+1)'(t - {2'b00, dv}), q_in[QW-2:0], 1'b1};
    else                  return {t[XW:0], q_in[QW-2:0], 1'b0};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < QW; s++) begin
        v[s] <= 1'b0; l[s] <= 1'b0; d[s] <= '0; rem[s] <= '0; q[s] <= '0;
      end
    end else if (adv) begin
      v[0] <= in_valid;
      l[0] <= in_last;
      d[0] <= in_data[XW-1:0];
      {rem[0], q[0]} <= step('0, '0, in_data[XW-1:0], 1'b1);
      for (int s = 1; s < QW; s++) begin
        v[s] <= v[s-1];
        l[s] <= l[s-1];
        d[s] <= d[s-1];
        {rem[s], q[s]} <= step(rem[s-1], q[s-1], d[s-1], 1'b0);
      end
    end
  end

  assign out_valid = v[QW-1];
  assign out_last  = l[QW-1];
  assign out_data  = 32'(q[QW-1]);
endmodule
