// Approximate magnitude of a complex number, |z| ~ max + 3/8 * min, where max and
// min are the larger and smaller of |re| and |im|. The result is within about 7 %
// of sqrt(re^2 + im^2). Purely combinational; the result has one more bit than
// the inputs so that it cannot overflow. The instruction "ABS approximation of
// complex data" is named by the architecture; the max/min formula and its
// coefficients are this design's choice.
module abs_approx #(
  parameter int unsigned N = 16
) (
  input  logic signed [N-1:0] re,
  input  logic signed [N-1:0] im,
  output logic        [N:0]   mag
);
  logic [N-1:0] ar, ai, mx, mn;
  always_comb begin
    ar  = re[N-1] ? N'(-re) : N'(re);
    ai  = im[N-1] ? N'(-im) : N'(im);
    mx  = (ar > ai) ? ar : ai;
    mn  = (ar > ai) ? ai : ar;
    mag = {1'b0, mx} + (N+1)'(mn >> 2) + (N+1)'(mn >> 3);
  end
endmodule
