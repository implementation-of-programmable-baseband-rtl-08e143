// Convolutional encoder accelerator, rate 1/2, constraint length K = 7, with
// two configurable generator polynomials.
//
// For each input bit u (bit 0 of the word) the 7-bit register r = {u, d1..d6}
// (d1 the previous input, in bit 5) gives the outputs A = ^(r & G0) and
// B = ^(r & G1), written as out_data[1:0] = {B, A}. The IEEE 802.11a code is
// G0 = 133 (octal), G1 = 171 (octal), with bit 6 the tap on the current input.
// Registers: 0 G0, 1 G1, 2 any write clears the delay line.
// Stream timing: one bit in, one output word per cycle, one cycle latency.
// The configurable polynomials are the document's; K = 7 and the register map
// are this design's choices.
module conv_encoder #(
  parameter int unsigned K = 7
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
  logic [K-1:0] g0, g1, r;
  logic [K-2:0] d;

  assign r        = {in_data[0], d};
  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g0 <= K'(7'o133); g1 <= K'(7'o171); d <= '0;
      out_valid <= 1'b0; out_data <= '0; out_last <= 1'b0;
    end else begin
      if (cfg_we) begin
        case (cfg_addr)
          4'd0: g0 <= cfg_data[K-1:0];
          4'd1: g1 <= cfg_data[K-1:0];
          4'd2: d  <= '0;
          default: ;
        endcase
      end else if (in_ready) begin
        out_valid <= in_valid;
        if (in_valid) begin
          d        <= r[K-1:1];
          out_data <= {30'b0, ^(r & g1), ^(r & g0)};
          out_last <= in_last;
        end
      end
    end
  end
endmodule
