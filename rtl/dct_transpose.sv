// dct_transpose: transpose register between the row and the column DCT.
//
// Eight word-serial-in, parallel-out registers of N*W bits (8 x 96 = 768
// flip-flops for W = 12) and eight 8-to-1 multiplexers. Every shift moves one
// finished row (its coefficients in ascending order, X0 in the most
// significant word) into register 0 while each register passes its content
// to the next one, so after eight rows register 7 holds row 0 and register 0
// row 7. The multiplexers then read one column: col[n] is word sel of the
// register holding row n, so sel = 0 yields the X0 column of all rows and
// sel = 7 the X7 column. The registers do not hold two blocks at once: the
// next block may only be shifted in after the last column has been read
// (the caller enforces it).
// Timing: shift takes effect at the clock edge; col is combinational in sel
// and the register contents.
module dct_transpose
  import dct_pkg::*;
#(
  parameter int unsigned W = 12           // coefficient width
) (
  input  logic                 clk,
  input  logic                 shift,
  input  logic signed [W-1:0]  row [N],   // X0..X7 of one row
  input  logic [2:0]           sel,       // column to read
  output logic signed [W-1:0]  col [N]    // element n = row n, column sel
);

  logic [N*W-1:0] regs [N];

  always_ff @(posedge clk) begin
    if (shift) begin
      for (int unsigned k = 0; k < N; k++)
        regs[0][(N-1-k)*W +: W] <= row[k];
      for (int unsigned r = 1; r < N; r++)
        regs[r] <= regs[r-1];
    end
  end

  always_comb begin
    for (int unsigned n = 0; n < N; n++)
      col[n] = regs[N-1-n][(N-1-32'(sel))*W +: W];
  end

endmodule
