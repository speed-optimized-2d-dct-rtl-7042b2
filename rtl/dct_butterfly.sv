// dct_butterfly: first stage of the 8-point DCT (adders and subtractors).
//
// Registers s[i] = x[i] + x[7-i] and d[i] = x[i] - x[7-i] for i = 0..3 when
// en is high. The sums feed the even coefficients and the differences the
// odd ones. With SHIFT = 0 the outputs keep full precision (IN_W+1 bits, the
// 9-bit row butterfly of an 8-bit input). With SHIFT = 1 the outputs are
// halved by an arithmetic right shift (floor) so they stay IN_W bits wide,
// which is how the column butterfly keeps its 12-bit width; where exactly the
// column butterfly drops its extra bit is this design's choice.
// Timing: one register stage, outputs valid the cycle after en.
module dct_butterfly
  import dct_pkg::*;
#(
  parameter int unsigned IN_W  = 8,
  parameter int unsigned SHIFT = 0,
  localparam int unsigned OUT_W = IN_W + 1 - SHIFT
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic signed [IN_W-1:0]   x [N],
  output logic signed [OUT_W-1:0]  s [HALF],
  output logic signed [OUT_W-1:0]  d [HALF]
);

  logic signed [IN_W:0] sum [HALF];
  logic signed [IN_W:0] dif [HALF];

  always_comb begin
    for (int unsigned i = 0; i < HALF; i++) begin
      sum[i] = (IN_W+1)'(x[i]) + (IN_W+1)'(x[N-1-i]);
      dif[i] = (IN_W+1)'(x[i]) - (IN_W+1)'(x[N-1-i]);
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      for (int unsigned i = 0; i < HALF; i++) begin
        s[i] <= OUT_W'(sum[i] >>> SHIFT);
        d[i] <= OUT_W'(dif[i] >>> SHIFT);
      end
    end
  end

endmodule
