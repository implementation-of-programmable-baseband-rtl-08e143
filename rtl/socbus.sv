// SOCBUS memory side: connects the core, the DMA manager, the radio receive port
// and the host (application processor) to BANKS data memory banks.
//
// The address space is BANKS*DEPTH words; the upper address bits pick the bank.
// Each bank has two read ports and one write port (dm_bank). Arbitration is by
// fixed priority, per bank and per port, in every cycle:
//   read port 0 : core operand A only
//   read port 1 : core operand B > DMA read > host read
//   write port  : core write > radio write > DMA write > host write
// The core is therefore never stalled; a master of lower priority sees its grant
// low and must hold its request (DMA, host) or drop the word (radio, which cannot
// wait and counts the loss itself). Read data is returned one cycle after the
// granted request, on each master's own data output.
// The bus is only named in the architecture; the bank count, the priority order
// and the single-cycle grant are this design's choices.
module socbus #(
  parameter int unsigned BANKS = 4,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = $clog2(BANKS*DEPTH)
) (
  input  logic          clk,
  // core
  input  logic          cra_en,  input logic [AW-1:0] cra_addr, output logic [W-1:0] cra_data,
  input  logic          crb_en,  input logic [AW-1:0] crb_addr, output logic [W-1:0] crb_data,
  input  logic          cw_en,   input logic [AW-1:0] cw_addr,  input  logic [W-1:0] cw_data,
  // DMA manager
  input  logic          dr_en,   input logic [AW-1:0] dr_addr,  output logic dr_gnt, output logic [W-1:0] dr_data,
  input  logic          dw_en,   input logic [AW-1:0] dw_addr,  input  logic [W-1:0] dw_data, output logic dw_gnt,
  // radio receive port
  input  logic          rw_en,   input logic [AW-1:0] rw_addr,  input  logic [W-1:0] rw_data, output logic rw_gnt,
  // host / application processor
  input  logic          hr_en,   input logic [AW-1:0] hr_addr,  output logic hr_gnt, output logic [W-1:0] hr_data,
  input  logic          hw_en,   input logic [AW-1:0] hw_addr,  input  logic [W-1:0] hw_data, output logic hw_gnt
);
  localparam int unsigned OW = $clog2(DEPTH);
  localparam int unsigned BW = (BANKS > 1) ? $clog2(BANKS) : 1;

  function automatic logic [BW-1:0] bank_of(input logic [AW-1:0] a);
    return BW'(a >> OW);
  endfunction

  logic          re0 [BANKS], re1 [BANKS], we [BANKS];
  logic [OW-1:0] ra0 [BANKS], ra1 [BANKS], wa [BANKS];
  logic [W-1:0]  rd0 [BANKS], rd1 [BANKS], wd [BANKS];

  always_comb begin
    dr_gnt = 1'b0; hr_gnt = 1'b0; rw_gnt = 1'b0; dw_gnt = 1'b0; hw_gnt = 1'b0;
    for (int b = 0; b < BANKS; b++) begin
      re0[b] = cra_en && (bank_of(cra_addr) == BW'(b));
      ra0[b] = cra_addr[OW-1:0];
      re1[b] = 1'b0; ra1[b] = '0;
      we[b]  = 1'b0; wa[b]  = '0; wd[b] = '0;
      // read port 1
      if (crb_en && bank_of(crb_addr) == BW'(b)) begin
        re1[b] = 1'b1; ra1[b] = crb_addr[OW-1:0];
      end else if (dr_en && bank_of(dr_addr) == BW'(b)) begin
        re1[b] = 1'b1; ra1[b] = dr_addr[OW-1:0]; dr_gnt = 1'b1;
      end else if (hr_en && bank_of(hr_addr) == BW'(b)) begin
        re1[b] = 1'b1; ra1[b] = hr_addr[OW-1:0]; hr_gnt = 1'b1;
      end
      // write port
      if (cw_en && bank_of(cw_addr) == BW'(b)) begin
        we[b] = 1'b1; wa[b] = cw_addr[OW-1:0]; wd[b] = cw_data;
      end else if (rw_en && bank_of(rw_addr) == BW'(b)) begin
        we[b] = 1'b1; wa[b] = rw_addr[OW-1:0]; wd[b] = rw_data; rw_gnt = 1'b1;
      end else if (dw_en && bank_of(dw_addr) == BW'(b)) begin
        we[b] = 1'b1; wa[b] = dw_addr[OW-1:0]; wd[b] = dw_data; dw_gnt = 1'b1;
      end else if (hw_en && bank_of(hw_addr) == BW'(b)) begin
        we[b] = 1'b1; wa[b] = hw_addr[OW-1:0]; wd[b] = hw_data; hw_gnt = 1'b1;
      end
    end
  end

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    dm_bank #(.W(W), .DEPTH(DEPTH)) u_bank (
      .clk, .re0(re0[b]), .ra0(ra0[b]), .rd0(rd0[b]),
      .re1(re1[b]), .ra1(ra1[b]), .rd1(rd1[b]),
      .we(we[b]), .wa(wa[b]), .wd(wd[b]));
  end

  // return path: remember which bank served each master
  logic [BW-1:0] cra_b, crb_b, dr_b, hr_b;
  always_ff @(posedge clk) begin
    cra_b <= bank_of(cra_addr);
    crb_b <= bank_of(crb_addr);
    dr_b  <= bank_of(dr_addr);
    hr_b  <= bank_of(hr_addr);
  end
  assign cra_data = rd0[cra_b];
  assign crb_data = rd1[crb_b];
  assign dr_data  = rd1[dr_b];
  assign hr_data  = rd1[hr_b];
endmodule
