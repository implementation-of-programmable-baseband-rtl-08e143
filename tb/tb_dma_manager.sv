// Self-checking test of the DMA manager with a memory model that refuses
// random read and write requests, and three accelerator models: number 0 adds
// one to each word (random in_ready), number 2 outputs only the sum of a job
// with out_last, number 6 is a sink without write-back (random in_ready).
// Checks the written results, busy/done, and that refusals and back-pressure
// occurred.
module tb_dma_manager;
  localparam int AW = 12, NA = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we = 0; logic [3:0] cfg_addr = 0; logic [31:0] cfg_data = 0;
  logic busy, done;
  logic dr_en, dr_gnt, dw_en, dw_gnt;
  logic [AW-1:0] dr_addr, dw_addr;
  logic [31:0] dr_data, dw_data;
  logic [NA-1:0] acc_in_valid, acc_in_ready, acc_out_valid, acc_out_ready, acc_out_last;
  logic [31:0] acc_in_data;
  logic acc_in_last;
  logic [31:0] acc_out_data [NA];
  dma_manager #(.AW(AW), .NUM_ACC(NA)) dut (.*);

  logic [31:0] mem [1 << AW];
  int refused = 0, stalled = 0;
  logic rg, wg;
  always @(posedge clk) #2 begin rg = $urandom_range(0, 3) != 0; wg = $urandom_range(0, 3) != 0; end
  assign dr_gnt = dr_en && rg;
  assign dw_gnt = dw_en && wg;
  always @(posedge clk) begin
    if (dr_gnt) dr_data <= mem[dr_addr];
    if (rst_n && dw_gnt) mem[dw_addr] <= dw_data;
    if ((dr_en && !dr_gnt) || (dw_en && !dw_gnt)) refused++;
    if (|(acc_in_valid & ~acc_in_ready)) stalled++;
  end

  // accelerator 0: +1, one-cycle register, random input ready
  logic v0, l0, r0; logic [31:0] d0;
  always @(posedge clk) #2 r0 = $urandom_range(0, 2) != 0;
  assign acc_in_ready[0] = r0 && (!v0 || acc_out_ready[0]);
  always @(posedge clk or negedge rst_n)
    if (!rst_n) v0 <= 0;
    else if (!v0 || acc_out_ready[0]) begin
      v0 <= acc_in_valid[0] && acc_in_ready[0];
      d0 <= acc_in_data + 1; l0 <= acc_in_last;
    end
  assign acc_out_valid[0] = v0; assign acc_out_data[0] = d0; assign acc_out_last[0] = l0;
  // accelerator 2: sum of the job
  logic v2; logic [31:0] s2, d2;
  assign acc_in_ready[2] = !v2;
  always @(posedge clk or negedge rst_n)
    if (!rst_n) begin v2 <= 0; s2 <= 0; end
    else begin
      if (v2 && acc_out_ready[2]) v2 <= 0;
      if (acc_in_valid[2] && acc_in_ready[2]) begin
        s2 <= acc_in_last ? 0 : s2 + acc_in_data;
        if (acc_in_last) begin v2 <= 1; d2 <= s2 + acc_in_data; end
      end
    end
  assign acc_out_valid[2] = v2; assign acc_out_data[2] = d2; assign acc_out_last[2] = 1'b1;
  // accelerator 6: sink
  logic [31:0] sunk [$];
  logic r6;
  always @(posedge clk) #2 r6 = $urandom_range(0, 1);
  assign acc_in_ready[6] = r6;
  always @(posedge clk) if (rst_n && acc_in_valid[6] && acc_in_ready[6]) sunk.push_back(acc_in_data);
  for (genvar g = 0; g < NA; g++) begin : g_unused
    if (g != 0 && g != 2 && g != 6) begin : g_tie
      assign acc_in_ready[g] = 0; assign acc_out_valid[g] = 0;
      assign acc_out_data[g] = 0; assign acc_out_last[g] = 0;
    end
  end

  int dones = 0;
  always @(posedge clk) if (rst_n && done) dones++;

  task automatic cfg(input int a, input logic [31:0] d);
    cfg_we = 1; cfg_addr = 4'(a); cfg_data = d;
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic job(input int src, input int dst, input int len, input int ctrl);
    cfg(0, src); cfg(1, dst); cfg(2, len); cfg(3, ctrl);
    checks++; if (!busy) begin failures++; $display("FAIL not busy"); end
    while (busy) @(negedge clk);
  endtask

  initial begin
    longint sum = 0;
    for (int a = 0; a < (1 << AW); a++) mem[a] = $urandom;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    job(100, 2000, 300, 32'h8 | 0);
    for (int i = 0; i < 300; i++) begin
      checks++; if (mem[2000 + i] !== mem[100 + i] + 1) begin failures++; $display("FAIL +1 word %0d", i); end
    end
    job(500, 3000, 50, 32'h8 | 2);
    for (int i = 0; i < 50; i++) sum += mem[500 + i];
    checks++; if (mem[3000] !== 32'(sum)) begin failures++; $display("FAIL sum"); end
    job(700, 0, 40, 32'h0 | 6);
    checks++; if (sunk.size() != 40) begin failures++; $display("FAIL sink got %0d", sunk.size()); end
    else foreach (sunk[i]) begin checks++; if (sunk[i] !== mem[700 + i]) failures++; end
    @(negedge clk);
    checks++; if (dones != 3) begin failures++; $display("FAIL done count %0d", dones); end
    checks++; if (refused == 0 || stalled == 0) begin failures++; $display("FAIL no refusal/stall"); end
    $display("refused %0d stalled %0d", refused, stalled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
