// Self-checking test of the RAKE receiver. A chip stream with gaps is sent
// through the unit, first disabled (it must pass samples unchanged), then with
// four fingers at random delays and weights, then with large weights that
// drive the output into saturation. A model here keeps its own history of the
// input and computes every combined output with integer arithmetic; the one
// cycle latency and one chip per cycle are checked on every sample. A last
// part checks that a single finger with weight 1/2 and delay 5 returns the
// input halved and five chips late (a two-path channel combined by hand).
module tb_rake_receiver;
  localparam int DMAX = 32, NF = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we = 0; logic [3:0] cfg_addr = 0; logic [31:0] cfg_data = 0;
  logic in_valid = 0, out_valid; logic [31:0] in_data = 0, out_data;
  rake_receiver dut (.*);

  int hist_re [$], hist_im [$];      // model history, newest first
  int d [NF], wr [NF], wi [NF];
  bit en = 0;

  task automatic cfg(input int a, input logic [31:0] v);
    @(negedge clk); cfg_we = 1; cfg_addr = 4'(a); cfg_data = v;
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic set_finger(int f, int dl, int re, int im);
    cfg(1, f); cfg(2, dl); cfg(3, {16'(im), 16'(re)});
    d[f] = dl; wr[f] = re; wi[f] = im;
  endtask

  function automatic int s16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  logic [31:0] expq [$];
  // drive one chip (or a gap) per cycle and queue its expected output
  task automatic chips(int n, int amp);
    for (int t = 0; t < n; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      if (in_valid) begin
        int xr, xi;
        longint sr, si;
        xr = $signed($urandom_range(0, 2 * amp)) - amp;
        xi = $signed($urandom_range(0, 2 * amp)) - amp;
        in_data = {16'(xi), 16'(xr)};
        hist_re.push_front(xr); hist_im.push_front(xi);
        if (hist_re.size() > DMAX) begin void'(hist_re.pop_back()); void'(hist_im.pop_back()); end
        if (!en) expq.push_back(in_data);
        else begin
          sr = 16384; si = 16384;
          for (int f = 0; f < NF; f++) begin
            int hr, hi;
            hr = (d[f] < hist_re.size()) ? hist_re[d[f]] : 0;
            hi = (d[f] < hist_im.size()) ? hist_im[d[f]] : 0;
            sr += longint'(hr) * wr[f] - longint'(hi) * wi[f];
            si += longint'(hr) * wi[f] + longint'(hi) * wr[f];
          end
          expq.push_back({16'(s16(si >>> 15)), 16'(s16(sr >>> 15))});
        end
      end
      @(posedge clk); #1;
      checks++;
      if (out_valid !== in_valid) begin failures++; $display("FAIL valid/latency t=%0d", t); end
      else if (out_valid) begin
        logic [31:0] e;
        e = expq.pop_front();
        if (out_data !== e) begin failures++; $display("FAIL chip t=%0d got %h expected %h", t, out_data, e); end
      end
      in_valid = 0;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int f = 0; f < NF; f++) begin d[f] = 0; wr[f] = 0; wi[f] = 0; end
    // disabled: pass-through
    chips(50, 30000);
    // four fingers
    for (int f = 0; f < NF; f++)
      set_finger(f, $urandom_range(0, DMAX - 1), $signed($urandom_range(0, 30000)) - 15000,
                 $signed($urandom_range(0, 30000)) - 15000);
    cfg(0, 1); en = 1;
    chips(300, 12000);
    // large weights and amplitudes: saturation
    for (int f = 0; f < NF; f++) set_finger(f, f * 7, 32767, (f & 1) ? -32768 : 32767);
    chips(200, 32000);
    // single finger: delayed, halved copy of the input
    set_finger(0, 5, 16384, 0);
    for (int f = 1; f < NF; f++) set_finger(f, 0, 0, 0);
    chips(100, 20000);
    checks++; if (expq.size() != 0) begin failures++; $display("FAIL leftover %0d", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
