// Programmable baseband processor (BBP): a DSP core built around a complex
// multiply-accumulate unit, shared data memories, and configurable hardware
// accelerators for the fixed functions of a WLAN-class transceiver.
//
// Blocks and connections:
//   radio front end (adc_*) -> fir_filter -> rake_receiver -> radio_rx_port
//       -> SOCBUS -> data memory (the RAKE passes samples unchanged when disabled)
//   (radio_rx_port register 3 selects the unfiltered adc_* samples instead;
//   filter register 3 turns the filter round to shape the transmit stream 6)
//   bbp_core (CMAC, ALU, AGUs)  <-> SOCBUS memory ports, configuration bus out
//   dma_manager <-> SOCBUS, streams to/from the accelerators:
//       0 recip (1/x), 1 demapper, 2 interleaver, 3 crc_scrambler,
//       4 conv_encoder, 5 viterbi, 6 transmit port towards the DAC (dac_*),
//       7 mapper
//   host / application processor (host_*) <-> SOCBUS (lowest priority)
// The configuration bus is written by the core's OUT instruction; address bits
// [7:4] select the unit (numbers in bbp_pkg), [3:0] its register.
// Program load: im_we/im_addr/im_data write the core's instruction memory;
// start runs from address 0 and halted rises at HALT.
// The partition of work between core and accelerators follows the document;
// the bus organisation, the unit numbering and the stream handshakes are this
// design's own.
module bbp_top
  import bbp_pkg::*;
#(
  parameter int unsigned BANKS    = 4,
  parameter int unsigned DEPTH    = 1024,
  parameter int unsigned IM_DEPTH = 256,
  parameter int unsigned FIR_TAPS = 16,
  parameter int unsigned VIT_LEN  = 256,
  localparam int unsigned AW      = $clog2(BANKS*DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // program memory and control
  input  logic          im_we,
  input  logic [$clog2(IM_DEPTH)-1:0] im_addr,
  input  logic [31:0]   im_data,
  input  logic          start,
  output logic          halted,
  // host (application processor) access to the data memory
  input  logic          host_wr_en,
  input  logic [AW-1:0] host_wr_addr,
  input  logic [31:0]   host_wr_data,
  output logic          host_wr_gnt,
  input  logic          host_rd_en,
  input  logic [AW-1:0] host_rd_addr,
  output logic          host_rd_gnt,
  output logic [31:0]   host_rd_data,
  // radio front end
  input  logic          adc_valid,
  input  logic [31:0]   adc_data,
  output logic          dac_valid,
  input  logic          dac_ready,
  output logic [31:0]   dac_data,
  // status
  output logic          dma_busy,
  output logic          dma_done,
  output logic [AW-1:0] rx_wptr,
  output logic [15:0]   rx_overflows
);
  // core <-> SOCBUS
  logic          cra_en, crb_en, cw_en;
  logic [AW-1:0] cra_addr, crb_addr, cw_addr;
  logic [31:0]   cra_data, crb_data, cw_data;
  logic          cfg_we;
  logic [7:0]    cfg_addr;
  logic [31:0]   cfg_data;
  // DMA <-> SOCBUS
  logic          dr_en, dr_gnt, dw_en, dw_gnt;
  logic [AW-1:0] dr_addr, dw_addr;
  logic [31:0]   dr_data, dw_data;
  // radio <-> SOCBUS
  logic          rw_en, rw_gnt;
  logic [AW-1:0] rw_addr;
  logic [31:0]   rw_data;
  // filtered receive samples
  logic          fir_valid, fir_last;
  logic [31:0]   fir_data;
  logic          rake_valid;
  logic [31:0]   rake_data;
  logic          fir_in_ready;
  // accelerator streams
  logic [NUM_ACC-1:0] a_in_valid, a_in_ready, a_out_valid, a_out_ready, a_out_last;
  logic [31:0]   a_in_data;
  logic          a_in_last;
  logic [31:0]   a_out_data [NUM_ACC];

  function automatic logic unit_we(input logic we, input logic [7:0] a, input logic [3:0] u);
    return we && (a[7:4] == u);
  endfunction

  bbp_core #(.AW(AW), .IM_DEPTH(IM_DEPTH)) u_core (
    .clk, .rst_n, .im_we, .im_addr, .im_data, .start, .halted,
    .cra_en, .cra_addr, .cra_data, .crb_en, .crb_addr, .crb_data,
    .cw_en, .cw_addr, .cw_data, .cfg_we, .cfg_addr, .cfg_data, .dma_busy);

  socbus #(.BANKS(BANKS), .DEPTH(DEPTH), .W(32)) u_bus (
    .clk,
    .cra_en, .cra_addr, .cra_data, .crb_en, .crb_addr, .crb_data,
    .cw_en, .cw_addr, .cw_data,
    .dr_en, .dr_addr, .dr_gnt, .dr_data, .dw_en, .dw_addr, .dw_data, .dw_gnt,
    .rw_en, .rw_addr, .rw_data, .rw_gnt,
    .hr_en(host_rd_en), .hr_addr(host_rd_addr), .hr_gnt(host_rd_gnt), .hr_data(host_rd_data),
    .hw_en(host_wr_en), .hw_addr(host_wr_addr), .hw_data(host_wr_data), .hw_gnt(host_wr_gnt));

  // Filter direction, register 3 of the filter unit: 0 receive (converter
  // samples -> filter -> RAKE -> receive buffer, anti-aliasing), 1 transmit
  // (stream 6 -> filter -> DAC, symbol shaping). The link is half duplex, so
  // one filter serves both directions.
  logic fir_tx;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fir_tx <= 1'b0;
    else if (unit_we(cfg_we, cfg_addr, UNIT_FIR) && cfg_addr[3:0] == 4'd3) fir_tx <= cfg_data[0];
  end

  fir_filter #(.TAPS(FIR_TAPS)) u_fir (
    .clk, .rst_n,
    .cfg_we(unit_we(cfg_we, cfg_addr, UNIT_FIR)), .cfg_addr(cfg_addr[3:0]), .cfg_data,
    .in_valid(fir_tx ? a_in_valid[ACC_DAC] : adc_valid), .in_ready(fir_in_ready),
    .in_data(fir_tx ? a_in_data : adc_data), .in_last(fir_tx && a_in_last),
    .out_valid(fir_valid), .out_ready(!fir_tx || dac_ready), .out_data(fir_data),
    .out_last(fir_last));

  rake_receiver u_rake (
    .clk, .rst_n,
    .cfg_we(unit_we(cfg_we, cfg_addr, UNIT_RAKE)), .cfg_addr(cfg_addr[3:0]), .cfg_data,
    .in_valid(fir_valid && !fir_tx), .in_data(fir_data), .out_valid(rake_valid),
    .out_data(rake_data));

  radio_rx_port #(.AW(AW)) u_rx (
    .clk, .rst_n,
    .cfg_we(unit_we(cfg_we, cfg_addr, UNIT_RADIO)), .cfg_addr(cfg_addr[3:0]), .cfg_data,
    .in_valid(rake_valid), .in_data(rake_data), .raw_valid(adc_valid), .raw_data(adc_data),
    .rw_en, .rw_addr, .rw_data, .rw_gnt, .wptr(rx_wptr), .overflows(rx_overflows));

  dma_manager #(.AW(AW), .NUM_ACC(NUM_ACC)) u_dma (
    .clk, .rst_n,
    .cfg_we(unit_we(cfg_we, cfg_addr, UNIT_DMA)), .cfg_addr(cfg_addr[3:0]), .cfg_data,
    .busy(dma_busy), .done(dma_done),
    .dr_en, .dr_addr, .dr_gnt, .dr_data, .dw_en, .dw_addr, .dw_data, .dw_gnt,
    .acc_in_valid(a_in_valid), .acc_in_ready(a_in_ready), .acc_in_data(a_in_data),
    .acc_in_last(a_in_last), .acc_out_valid(a_out_valid), .acc_out_ready(a_out_ready),
    .acc_out_data(a_out_data), .acc_out_last(a_out_last));

  recip u_recip (
    .clk, .rst_n,
    .in_valid(a_in_valid[UNIT_RECIP]), .in_ready(a_in_ready[UNIT_RECIP]), .in_data(a_in_data),
    .in_last(a_in_last), .out_valid(a_out_valid[UNIT_RECIP]), .out_ready(a_out_ready[UNIT_RECIP]),
    .out_data(a_out_data[UNIT_RECIP]), .out_last(a_out_last[UNIT_RECIP]));

  demapper u_demap (
    .clk, .rst_n,
    .cfg_we(unit_we(cfg_we, cfg_addr, UNIT_DEMAP)), .cfg_addr(cfg_addr[3:0]), .cfg_data,
    .in_valid(a_in_valid[UNIT_DEMAP]), .in_ready(a_in_ready[UNIT_DEMAP]), .in_data(a_in_data),
    .in_last(a_in_last), .out_valid(a_out_valid[UNIT_DEMAP]), .out_ready(a_out_ready[UNIT_DEMAP]),
    .out_data(a_out_data[UNIT_DEMAP]), .out_last(a_out_last[UNIT_DEMAP]));

  interleaver u_ilv (
    .clk, .rst_n,
    .cfg_we(unit_we(cfg_we, cfg_addr, UNIT_ILV)), .cfg_addr(cfg_addr[3:0]), .cfg_data,
    .in_valid(a_in_valid[UNIT_ILV]), .in_ready(a_in_ready[UNIT_ILV]), .in_data(a_in_data),
    .in_last(a_in_last), .out_valid(a_out_valid[UNIT_ILV]), .out_ready(a_out_ready[UNIT_ILV]),
    .out_data(a_out_data[UNIT_ILV]), .out_last(a_out_last[UNIT_ILV]));

  crc_scrambler u_crc (
    .clk, .rst_n,
    .cfg_we(unit_we(cfg_we, cfg_addr, UNIT_CRC)), .cfg_addr(cfg_addr[3:0]), .cfg_data,
    .in_valid(a_in_valid[UNIT_CRC]), .in_ready(a_in_ready[UNIT_CRC]), .in_data(a_in_data),
    .in_last(a_in_last), .out_valid(a_out_valid[UNIT_CRC]), .out_ready(a_out_ready[UNIT_CRC]),
    .out_data(a_out_data[UNIT_CRC]), .out_last(a_out_last[UNIT_CRC]));

  conv_encoder u_conv (
    .clk, .rst_n,
    .cfg_we(unit_we(cfg_we, cfg_addr, UNIT_CONV)), .cfg_addr(cfg_addr[3:0]), .cfg_data,
    .in_valid(a_in_valid[UNIT_CONV]), .in_ready(a_in_ready[UNIT_CONV]), .in_data(a_in_data),
    .in_last(a_in_last), .out_valid(a_out_valid[UNIT_CONV]), .out_ready(a_out_ready[UNIT_CONV]),
    .out_data(a_out_data[UNIT_CONV]), .out_last(a_out_last[UNIT_CONV]));

  viterbi #(.MAXLEN(VIT_LEN)) u_vit (
    .clk, .rst_n,
    .cfg_we(unit_we(cfg_we, cfg_addr, UNIT_VIT)), .cfg_addr(cfg_addr[3:0]), .cfg_data,
    .in_valid(a_in_valid[UNIT_VIT]), .in_ready(a_in_ready[UNIT_VIT]), .in_data(a_in_data),
    .in_last(a_in_last), .out_valid(a_out_valid[UNIT_VIT]), .out_ready(a_out_ready[UNIT_VIT]),
    .out_data(a_out_data[UNIT_VIT]), .out_last(a_out_last[UNIT_VIT]));

  mapper u_map (
    .clk, .rst_n,
    .cfg_we(unit_we(cfg_we, cfg_addr, UNIT_MAP)), .cfg_addr(cfg_addr[3:0]), .cfg_data,
    .in_valid(a_in_valid[UNIT_MAP]), .in_ready(a_in_ready[UNIT_MAP]), .in_data(a_in_data),
    .in_last(a_in_last), .out_valid(a_out_valid[UNIT_MAP]), .out_ready(a_out_ready[UNIT_MAP]),
    .out_data(a_out_data[UNIT_MAP]), .out_last(a_out_last[UNIT_MAP]));

  // transmit port: stream number 6 goes to the DAC side, through the filter
  // when it is set to transmit
  assign dac_valid              = fir_tx ? fir_valid : a_in_valid[ACC_DAC];
  assign dac_data               = fir_tx ? fir_data  : a_in_data;
  assign a_in_ready[ACC_DAC]    = fir_tx ? fir_in_ready : dac_ready;
  assign a_out_valid[ACC_DAC]   = 1'b0;
  assign a_out_data[ACC_DAC]    = '0;
  assign a_out_last[ACC_DAC]    = 1'b0;
endmodule
