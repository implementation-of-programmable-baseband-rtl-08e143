// Self-checking test of the mapper accelerator. For each modulation the table
// is loaded with the IEEE 802.11a Gray levels (spacing 2 U), written here from
// the level/label lists of the standard, and every label is mapped; the
// expected point is found by searching those lists. The mapper's output is
// also fed to a de-mapper, which must return the original label. A final
// stream of random 64-QAM labels runs with random output back-pressure and
// checks order, values, out_last and one-symbol-per-cycle throughput.
module tb_mapper;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we = 0; logic [3:0] cfg_addr = 0; logic [31:0] cfg_data = 0;
  logic in_valid = 0, in_ready, in_last = 0, out_valid, out_ready = 1, out_last;
  logic [31:0] in_data = 0, out_data;
  mapper dut (.*);

  // de-mapper on the mapper output, for the round trip
  logic dm_ready, dm_valid, dm_last; logic [31:0] dm_data;
  demapper u_dm (.clk, .rst_n, .cfg_we, .cfg_addr(cfg_addr ^ 4'd8), .cfg_data,
                 .in_valid(out_valid && out_ready), .in_ready(dm_ready), .in_data(out_data),
                 .in_last(out_last), .out_valid(dm_valid), .out_ready(1'b1),
                 .out_data(dm_data), .out_last(dm_last));

  localparam int U = 1500;
  int lev64 [8] = '{-7, -5, -3, -1, 1, 3, 5, 7};
  int lab64 [8] = '{3'b000, 3'b100, 3'b110, 3'b010, 3'b011, 3'b111, 3'b101, 3'b001};
  int lev16 [4] = '{-3, -1, 1, 3};
  int lab16 [4] = '{2'b00, 2'b10, 2'b11, 2'b01};

  // mapper registers at 0..2; de-mapper registers reached as 8 and 9
  task automatic cfg(input int a, input int d);
    @(negedge clk); cfg_we = 1; cfg_addr = 4'(a); cfg_data = d;
    @(negedge clk); cfg_we = 0;
  endtask

  function automatic int axis_level(int mode, int lab);
    case (mode)
      0, 1: return lab ? U : -U;
      2: for (int a = 0; a < 4; a++) if (lab16[a] == lab) return lev16[a] * U;
      default: for (int a = 0; a < 8; a++) if (lab64[a] == lab) return lev64[a] * U;
    endcase
    return 0;
  endfunction
  function automatic logic [31:0] point(int mode, int lab);
    int h, i, q;
    h = (mode == 3) ? 3 : (mode == 2) ? 2 : 1;
    i = axis_level(mode, lab & ((1 << h) - 1));
    q = (mode == 0) ? 0 : axis_level(mode, lab >> h);
    return {16'(q), 16'(i)};
  endfunction

  task automatic load_table(int mode);
    cfg(0, mode); cfg(8, mode);
    cfg(1, 0);
    for (int v = 0; v < 8; v++) begin
      int h;
      h = (mode == 3) ? 3 : (mode == 2) ? 2 : 1;
      cfg(2, (v < (1 << h)) ? axis_level(mode, v) : 0);
    end
  endtask

  int bits_of [4] = '{1, 2, 4, 6};
  logic [31:0] exp_q [$];
  logic [5:0]  lab_q [$];
  int n_out = 0, n_dm = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      logic [31:0] e;
      checks++;
      e = exp_q.pop_front();
      if (out_data !== e) begin failures++; $display("FAIL point %h expected %h", out_data, e); end
      n_out++;
    end
    if (dm_valid) begin
      logic [5:0] l;
      checks++;
      l = lab_q.pop_front();
      if (dm_data !== 32'(l)) begin failures++; $display("FAIL round trip %h expected %h", dm_data, l); end
      n_dm++;
    end
  end

  initial begin
    int t0, last_seen;
    repeat (2) @(posedge clk); rst_n = 1;
    cfg(9, U);
    for (int m = 0; m < 4; m++) begin
      load_table(m);
      for (int lab = 0; lab < (1 << bits_of[m]); lab++) begin
        @(negedge clk);
        in_valid = 1; in_data = 32'(lab);
        exp_q.push_back(point(m, lab)); lab_q.push_back(6'(lab));
        @(posedge clk); #1; in_valid = 0;
      end
      repeat (4) @(negedge clk);
    end
    // 64-QAM stream under back-pressure
    fork
      begin
        for (int t = 0; t < 300; t++) begin
          @(posedge clk); #2; out_ready = ($urandom_range(0, 3) != 0);
        end
        @(posedge clk); #2; out_ready = 1;
      end
    join_none
    last_seen = 0;
    for (int t = 0; t < 200; t++) begin
      logic [5:0] lab;
      lab = 6'($urandom);
      @(negedge clk);
      in_valid = 1; in_data = 32'(lab); in_last = (t == 199);
      exp_q.push_back(point(3, lab)); lab_q.push_back(lab);
      @(posedge clk); #1;
      while (!in_ready) begin @(posedge clk); #1; end
    end
    @(negedge clk); in_valid = 0; in_last = 0;
    t0 = 0;
    while (!(out_valid && out_last) && t0 < 1000) begin @(posedge clk); #1; t0++; end
    checks++; if (!out_last) begin failures++; $display("FAIL out_last"); end
    repeat (400) @(negedge clk);
    // throughput with the output always taken: 50 symbols in 51 cycles
    out_ready = 1;
    t0 = n_out;
    for (int t = 0; t < 50; t++) begin
      @(negedge clk); in_valid = 1; in_data = 32'(t & 63);
      exp_q.push_back(point(3, t & 63)); lab_q.push_back(6'(t & 63));
    end
    @(negedge clk); in_valid = 0;
    @(negedge clk);
    checks++; if (n_out - t0 != 50) begin failures++; $display("FAIL throughput %0d", n_out - t0); end
    repeat (4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || lab_q.size() != 0 || n_dm != n_out) begin
      failures++; $display("FAIL leftover %0d %0d", exp_q.size(), lab_q.size());
    end
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
