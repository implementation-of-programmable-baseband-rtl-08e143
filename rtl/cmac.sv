// CMAC: complex multiply-accumulate unit of the baseband core.
//
// Operands A = AR + jAI and B = BR + jBI are N-bit two's complement. Stage 1
// forms the four real products in four NxN multipliers and registers them
// (RMR = AR*BR, IMI = AI*BI, RMI = AR*BI, IMR = AI*BR). Stage 2 combines them in
// two 2N-bit add/subtract units:
//   XR = RMR - IMI, XI = IMR + RMI            (A * B)
//   XR = RMR + IMI, XI = IMR - RMI            (A * conj(B), conj = 1)
// and, when acc_en is set, adds XR / XI into one of NACC accumulator registers of
// each file (ACRR for the real part, ACIR for the imaginary part) through two
// further 2N-bit adders. clr makes the accumulation start from zero.
// The multiplier/adder structure, the register names and the 2N-bit adder width
// follow the architecture drawing of the CMAC; the number of accumulator
// registers, the pipeline control signals and the wrap-around (non-saturating)
// accumulation are this design's choices. The drawing also routes the raw
// operands to the accumulator adders; that path is not built here.
//
// Operand masking: the multiplier inputs are forced to zero in cycles without
// in_valid, so idle cycles do not toggle the multipliers (the document credits
// operand masking in the datapath for its low power; the gating form is this
// design's choice).
//
// Timing: an operation presented with in_valid in cycle t has its XR/XI on the
// outputs (out_valid) in cycle t+1 and its accumulator update visible in t+2.
module cmac #(
  parameter int unsigned N    = 16,  // operand width
  parameter int unsigned NACC = 4    // accumulator registers per file
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [N-1:0]     ar, ai, br, bi,
  input  logic                    conj,
  input  logic                    acc_en,
  input  logic                    clr,
  input  logic [$clog2(NACC)-1:0] acc_sel,
  output logic                    out_valid,
  output logic signed [2*N-1:0]   xr, xi,
  input  logic [$clog2(NACC)-1:0] rd_sel,
  output logic signed [2*N-1:0]   acc_re, acc_im
);
  localparam int unsigned AW = $clog2(NACC);

  logic signed [2*N-1:0] rmr, imi, rmi, imr;
  logic signed [N-1:0]   mar, mai, mbr, mbi;   // masked operands

  assign mar = in_valid ? ar : '0;
  assign mai = in_valid ? ai : '0;
  assign mbr = in_valid ? br : '0;
  assign mbi = in_valid ? bi : '0;
  logic          s1_conj, s1_acc, s1_clr;
  logic [AW-1:0] s1_sel;
  logic signed [2*N-1:0] acrr [NACC];
  logic signed [2*N-1:0] acir [NACC];

  // stage 1: four NxN multipliers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      rmr <= '0; imi <= '0; rmi <= '0; imr <= '0;
      s1_conj <= 1'b0; s1_acc <= 1'b0; s1_clr <= 1'b0; s1_sel <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        rmr <= mar * mbr;
        imi <= mai * mbi;
        rmi <= mar * mbi;
        imr <= mai * mbr;
        s1_conj <= conj;
        s1_acc  <= acc_en;
        s1_clr  <= clr;
        s1_sel  <= acc_sel;
      end
    end
  end

  // stage 2: add/sub units
  always_comb begin
    if (s1_conj) begin
      xr = rmr + imi;
      xi = imr - rmi;
    end else begin
      xr = rmr - imi;
      xi = imr + rmi;
    end
  end

  // accumulators
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NACC; k++) begin
        acrr[k] <= '0;
        acir[k] <= '0;
      end
    end else if (out_valid && s1_acc) begin
      acrr[s1_sel] <= (s1_clr ? '0 : acrr[s1_sel]) + xr;
      acir[s1_sel] <= (s1_clr ? '0 : acir[s1_sel]) + xi;
    end
  end

  assign acc_re = acrr[rd_sel];
  assign acc_im = acir[rd_sel];

endmodule
