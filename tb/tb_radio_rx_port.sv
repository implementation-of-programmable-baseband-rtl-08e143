// Self-checking test of the radio receive port: samples arriving every cycle
// are written round a circular buffer (base 200, 37 words); writes refused by
// the bus are dropped and counted. The model follows the grants and checks
// every address and word, the pointer wrap and the overflow count. A second
// phase switches the source to the raw samples (filter bypass) while different
// words arrive on the filtered input, and checks that only the raw ones land.
module tb_radio_rx_port;
  localparam int AW = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we = 0; logic [3:0] cfg_addr = 0; logic [31:0] cfg_data = 0;
  logic in_valid = 0; logic [31:0] in_data = 0;
  logic raw_valid = 0; logic [31:0] raw_data = 0;
  logic rw_en, rw_gnt; logic [AW-1:0] rw_addr, wptr; logic [31:0] rw_data; logic [15:0] overflows;
  radio_rx_port #(.AW(AW)) dut (.*);

  int ptr = 0, drops = 0, wraps = 0, raw_writes = 0;
  always @(posedge clk) #2 rw_gnt = $urandom_range(0, 4) != 0;

  task automatic cfg(input int a, input logic [31:0] d);
    cfg_we = 1; cfg_addr = 4'(a); cfg_data = d;
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    cfg(0, 200); cfg(1, 37); cfg(2, 1);
    for (int t = 0; t < 500; t++) begin
      in_valid = ($urandom_range(0, 5) != 0); in_data = $urandom;
      #1;
      if (in_valid) begin
        checks++;
        if (!rw_en || rw_addr !== AW'(200 + ptr) || rw_data !== in_data) begin
          failures++; $display("FAIL write t=%0d addr %0d expected %0d", t, rw_addr, 200 + ptr);
        end
        if (rw_gnt) begin ptr = (ptr + 1) % 37; if (ptr == 0) wraps++; end
        else drops++;
      end else begin
        checks++; if (rw_en) failures++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    @(negedge clk);
    checks += 2;
    if (int'(wptr) != ptr) begin failures++; $display("FAIL wptr"); end
    if (int'(overflows) != drops || drops == 0 || wraps < 2) begin
      failures++; $display("FAIL overflows %0d vs %0d, wraps %0d", overflows, drops, wraps);
    end
    // bypass phase: source register set to raw, pointer restarts at 0
    cfg(3, 1); ptr = 0;
    for (int t = 0; t < 100; t++) begin
      in_valid = $urandom_range(0, 1); in_data = $urandom;
      raw_valid = $urandom_range(0, 2) != 0; raw_data = $urandom;
      #1;
      checks++;
      if (rw_en !== raw_valid || (raw_valid && (rw_data !== raw_data || rw_addr !== AW'(200 + ptr)))) begin
        failures++; $display("FAIL bypass t=%0d", t);
      end
      if (raw_valid && rw_gnt) begin ptr = (ptr + 1) % 37; raw_writes++; end
      @(negedge clk);
    end
    raw_valid = 0; in_valid = 0;
    cfg(3, 0);
    in_valid = 1; in_data = 32'h1234_5678; raw_valid = 1; raw_data = 32'h0;
    #1; checks++;
    if (!rw_en || rw_data !== 32'h1234_5678) begin failures++; $display("FAIL source back to filter"); end
    @(negedge clk); in_valid = 0; raw_valid = 0;
    checks++;
    if (raw_writes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
