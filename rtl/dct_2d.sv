// dct_2d: 8x8 two-dimensional DCT by row-column decomposition with
// distributed arithmetic, for 8-bit signed samples.
//
// Structure: a row 1D DCT (8-bit in, 9-bit butterfly, 10-bit DA word, 12-bit
// out), the 768-bit transpose register, and a column 1D DCT (12-bit in,
// butterfly halved back to 12 bits, 12-bit DA word, 14-bit out). Each RAC
// takes NUM_ROMS bit planes per cycle: NUM_ROMS = 2 is the two-ROM RAC (5
// cycles per row, 6 per column), NUM_ROMS = 4 the four-ROM RAC (3 and 3).
//
// Interface: one row of the block enters per handshake on in_row, sample x0
// in bits 63:56 down to x7 in bits 7:0 (two's complement). Rows are taken at
// most one per row-RAC period; in_ready also stays low after the eighth row
// of a block until the transpose register has been read out. Results leave
// column by column: out_col holds Z[0][p] in bits 111:98 down to Z[7][p] in
// bits 13:0, with out_idx = p and out_valid high for one cycle per column.
// Z = C x C^T / 4096 with C the integer cosine matrix of dct_pkg, i.e. 8
// times the orthonormal 2D DCT, up to the rounding in each pass.
//
// Timing with a source that never waits: the last column of a block is on
// out_col 8*R + 8*S + 13 cycles after the cycle in which its first row is
// taken (R, S = row and column RAC periods: 101 cycles with two ROMs, 61 with
// four), and a new block can start every 8*R + 7*S + 8 cycles (90 and 53).
// The per-row and per-column RAC periods follow the reference architecture;
// its block times of 105 and 65 cycles imply the same 8*R + 8*S structure
// with a fixed overhead of 17 cycles, where this pipeline needs 13. The
// pipeline registers around the RACs, the handshake and the sequencing are
// this design's own.
module dct_2d
  import dct_pkg::*;
#(
  parameter int unsigned NUM_ROMS = 2     // ROMs per RAC: 2 or 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [63:0]   in_row,
  output logic          out_valid,
  output logic [2:0]    out_idx,
  output logic [111:0]  out_col
);

  localparam int unsigned IN_W  = 8;
  localparam int unsigned MID_W = 12;     // row results, transpose words
  localparam int unsigned OUT_W = 14;

  // ---- row pass -----------------------------------------------------------
  logic signed [IN_W-1:0]  row_x [N];
  logic signed [MID_W-1:0] row_y [N];
  logic                    row_ready, row_take, row_out_valid;
  logic [3:0]              rows_in, rows_wr;
  logic [2:0]              col_rd;
  logic                    full;

  always_comb
    for (int unsigned n = 0; n < N; n++)
      row_x[n] = in_row[(N-1-n)*IN_W +: IN_W];

  assign in_ready = row_ready && (rows_in != 4'(N));
  assign row_take = in_valid && in_ready;

  dct_1d #(
    .IN_W(IN_W), .BF_SHIFT(0), .APPEND_ZERO(1), .P(NUM_ROMS),
    .OUT_W(MID_W), .RND_SHIFT(6)
  ) u_row (
    .clk(clk), .rst_n(rst_n),
    .in_valid(row_take), .in_ready(row_ready), .in_x(row_x),
    .out_valid(row_out_valid), .out_y(row_y)
  );

  // ---- transpose register ---------------------------------------------------
  logic signed [MID_W-1:0] col_x [N];
  logic                    col_ready, col_take;

  dct_transpose #(.W(MID_W)) u_tr (
    .clk(clk), .shift(row_out_valid), .row(row_y), .sel(col_rd), .col(col_x)
  );

  assign full     = (rows_wr == 4'(N));
  assign col_take = full && col_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rows_in <= '0;
      rows_wr <= '0;
      col_rd  <= '0;
    end else begin
      if (row_take)      rows_in <= rows_in + 1'b1;
      if (row_out_valid) rows_wr <= rows_wr + 1'b1;
      if (col_take) begin
        col_rd <= col_rd + 1'b1;
        if (col_rd == 3'(N - 1)) begin   // block read out: free the register
          rows_in <= '0;
          rows_wr <= '0;
        end
      end
    end
  end

  // ---- column pass ----------------------------------------------------------
  logic signed [OUT_W-1:0] col_y [N];
  logic                    col_out_valid;

  dct_1d #(
    .IN_W(MID_W), .BF_SHIFT(1), .APPEND_ZERO(0), .P(NUM_ROMS),
    .OUT_W(OUT_W), .RND_SHIFT(6)
  ) u_col (
    .clk(clk), .rst_n(rst_n),
    .in_valid(col_take), .in_ready(col_ready), .in_x(col_x),
    .out_valid(col_out_valid), .out_y(col_y)
  );

  always_comb
    for (int unsigned k = 0; k < N; k++)
      out_col[(N-1-k)*OUT_W +: OUT_W] = col_y[k];

  assign out_valid = col_out_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             out_idx <= '0;
    else if (col_out_valid) out_idx <= out_idx + 1'b1;
  end

  // The transpose register holds one block: no row may arrive while it is
  // full, and the row counter never passes eight.
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    !(row_out_valid && full));
  a_rows_bound: assert property (@(posedge clk) disable iff (!rst_n)
    rows_in <= 4'(N));

  initial assert (NUM_ROMS == 1 || NUM_ROMS == 2 || NUM_ROMS == 4)
    else $error("dct_2d: NUM_ROMS must be 1, 2 or 4");

endmodule
