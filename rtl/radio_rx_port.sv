// Radio receive port: writes the filtered receive samples into a circular
// buffer in data memory, where the core reads them with modulo addressing.
//
// Registers: 0 buffer base address, 1 buffer length in words, 2 enable (bit 0;
// any write also resets the write pointer), 3 source (bit 0: 1 takes the raw
// converter samples on raw_*, bypassing the filter; 0 takes the filtered
// samples on in_*). Each sample that arrives with
// in_valid is written to base + wptr and wptr then advances modulo the length.
// The port cannot hold up the radio: when the SOCBUS refuses the write (the core
// writes the same bank in that cycle) the sample is dropped and the overflow
// counter is incremented. wptr and the overflow count are outputs.
// The radio front end feeding the core both through the filter and directly is
// drawn in the document's architecture figure; the circular buffer, the
// drop-on-conflict rule and the source register are this design's choices.
module radio_rx_port #(
  parameter int unsigned AW = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_we,
  input  logic [3:0]    cfg_addr,
  input  logic [31:0]   cfg_data,
  input  logic          in_valid,
  input  logic [31:0]   in_data,
  input  logic          raw_valid,
  input  logic [31:0]   raw_data,
  output logic          rw_en,
  output logic [AW-1:0] rw_addr,
  output logic [31:0]   rw_data,
  input  logic          rw_gnt,
  output logic [AW-1:0] wptr,
  output logic [15:0]   overflows
);
  logic [AW-1:0] base, blen;
  logic          en, raw;

  assign rw_en   = en && (raw ? raw_valid : in_valid);
  assign rw_addr = base + wptr;
  assign rw_data = raw ? raw_data : in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base <= '0; blen <= AW'(64); en <= 1'b0; raw <= 1'b0; wptr <= '0; overflows <= '0;
    end else if (cfg_we) begin
      case (cfg_addr)
        4'd0: base <= AW'(cfg_data);
        4'd1: blen <= AW'(cfg_data);
        4'd2: en   <= cfg_data[0];
        4'd3: raw  <= cfg_data[0];
        default: ;
      endcase
      wptr <= '0;
    end else if (rw_en) begin
      if (rw_gnt) wptr <= (wptr + AW'(1) >= blen) ? '0 : wptr + AW'(1);
      else        overflows <= overflows + 16'd1;
    end
  end
endmodule
