// DMA manager: moves a block of words from data memory through one accelerator
// and writes the accelerator's results back, without the core.
//
// A job is set up over the configuration bus: reg 0 source address, reg 1
// destination address, reg 2 length in input words, reg 3 control
// {write_back (bit 3), accelerator number (bits 2:0)}; writing reg 3 starts the
// job and raises busy. The read side requests words on the SOCBUS DMA read port
// (a request may be refused when the core uses the same bank; it is simply
// retried) and keeps at most two words in flight in a small buffer, so the
// accelerator's in_ready back-pressure never loses data. The last input word is
// marked in_last. The write side writes each accelerator output word to
// consecutive addresses from the destination and passes the write grant back as
// out_ready. With write_back set the job ends when the word marked out_last
// has been written; without it (the transmit port towards the DAC) it ends
// when the last word has been handed over. done pulses for one cycle at the end.
// Timing: one word per cycle when nothing is refused and the accelerator keeps
// up. Managing DMA is the document's; the register map and the stream
// handshake are this design's own.
module dma_manager #(
  parameter int unsigned AW      = 12,
  parameter int unsigned NUM_ACC = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_we,
  input  logic [3:0]         cfg_addr,
  input  logic [31:0]        cfg_data,
  output logic               busy,
  output logic               done,
  // SOCBUS
  output logic               dr_en,
  output logic [AW-1:0]      dr_addr,
  input  logic               dr_gnt,
  input  logic [31:0]        dr_data,
  output logic               dw_en,
  output logic [AW-1:0]      dw_addr,
  output logic [31:0]        dw_data,
  input  logic               dw_gnt,
  // accelerator streams
  output logic [NUM_ACC-1:0] acc_in_valid,
  input  logic [NUM_ACC-1:0] acc_in_ready,
  output logic [31:0]        acc_in_data,
  output logic               acc_in_last,
  input  logic [NUM_ACC-1:0] acc_out_valid,
  output logic [NUM_ACC-1:0] acc_out_ready,
  input  logic [31:0]        acc_out_data [NUM_ACC],
  input  logic [NUM_ACC-1:0] acc_out_last
);
  localparam int unsigned SW = $clog2(NUM_ACC);

  logic [AW-1:0] src, dst, wcnt;
  logic [15:0]   len, issued, sent;
  logic [SW-1:0] sel;
  logic          wb;
  logic          inflight;
  logic [31:0]   fifo [2];
  logic [1:0]    fcnt;
  logic          push, pop, wr;

  assign dr_en   = busy && (issued < len) && (32'(fcnt) + 32'(inflight) < 2);
  assign dr_addr = src + AW'(issued);
  assign push    = inflight;                       // data returns one cycle after the grant

  always_comb begin
    acc_in_valid = '0;
    acc_in_valid[sel] = busy && (fcnt != 2'd0);
  end
  assign acc_in_data = fifo[0];
  assign acc_in_last = (sent + 16'd1 == len);
  assign pop = busy && (fcnt != 2'd0) && acc_in_ready[sel];

  assign dw_en   = busy && wb && acc_out_valid[sel];
  assign dw_addr = dst + wcnt;
  assign dw_data = acc_out_data[sel];
  assign wr      = dw_en && dw_gnt;
  always_comb begin
    acc_out_ready = '0;
    acc_out_ready[sel] = wb ? dw_gnt : 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src <= '0; dst <= '0; len <= '0; sel <= '0; wb <= 1'b0;
      busy <= 1'b0; done <= 1'b0; issued <= '0; sent <= '0; wcnt <= '0;
      inflight <= 1'b0; fcnt <= '0; fifo[0] <= '0; fifo[1] <= '0;
    end else begin
      done <= 1'b0;
      inflight <= dr_en && dr_gnt;
      if (dr_en && dr_gnt) issued <= issued + 16'd1;
      // two-entry buffer
      case ({push, pop})
        2'b10: begin fifo[fcnt[0]] <= dr_data; fcnt <= fcnt + 2'd1; end
        2'b01: begin fifo[0] <= fifo[1]; fcnt <= fcnt - 2'd1; end
        2'b11: begin
          if (fcnt == 2'd1) fifo[0] <= dr_data;
          else begin fifo[0] <= fifo[1]; fifo[1] <= dr_data; end
        end
        default: ;
      endcase
      if (pop) sent <= sent + 16'd1;
      if (wr) wcnt <= wcnt + AW'(1);
      if (busy && ((wb && wr && acc_out_last[sel]) || (!wb && pop && sent + 16'd1 == len))) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
      if (cfg_we && !busy) begin
        case (cfg_addr)
          4'd0: src <= AW'(cfg_data);
          4'd1: dst <= AW'(cfg_data);
          4'd2: len <= cfg_data[15:0];
          4'd3: begin
            sel <= SW'(cfg_data[2:0]); wb <= cfg_data[3];
            busy <= 1'b1; issued <= '0; sent <= '0; wcnt <= '0;
          end
          default: ;
        endcase
      end
    end
  end

  // the two-word buffer never overflows
  assert property (@(posedge clk) disable iff (!rst_n) !(push && !pop && fcnt == 2'd2));
  // stream rule: a word offered to an accelerator stays offered, unchanged,
  // until the accelerator takes it
  assert property (@(posedge clk) disable iff (!rst_n)
    (|(acc_in_valid & ~acc_in_ready)) |=> (acc_in_valid == $past(acc_in_valid)) &&
                                          (acc_in_data == $past(acc_in_data)) &&
                                          (acc_in_last == $past(acc_in_last)));
endmodule
