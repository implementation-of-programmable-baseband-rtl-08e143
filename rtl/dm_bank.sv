// One data memory bank: DEPTH words of W bits with two synchronous read ports and
// one write port. Read data appears the cycle after the address. A read and a
// write to the same word in the same cycle return the old contents. The
// architecture shows several data memories next to the core; their size and port
// count are not given, so DEPTH = 1024 and the 2R1W organisation are this
// design's choice (two reads per cycle let the CMAC take both vector operands
// from one bank).
module dm_bank #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     re0,
  input  logic [$clog2(DEPTH)-1:0] ra0,
  output logic [W-1:0]             rd0,
  input  logic                     re1,
  input  logic [$clog2(DEPTH)-1:0] ra1,
  output logic [W-1:0]             rd1,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] wa,
  input  logic [W-1:0]             wd
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)  mem[wa] <= wd;
    if (re0) rd0 <= mem[ra0];
    if (re1) rd1 <= mem[ra1];
  end
endmodule
