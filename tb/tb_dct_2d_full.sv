// tb_dct_2d_full: one 8x8 block of random samples through the core at its
// default configuration (two ROMs per RAC). All 64 coefficients are compared
// with dct_ref_pkg, and the last column must leave 101 cycles after the cycle
// in which the first row is taken (8*5 + 8*6 + 13).
module tb_dct_2d_full;
  import dct_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  int   cycle = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  logic         in_valid = 1'b0, in_ready, out_valid;
  logic [63:0]  in_row;
  logic [2:0]   out_idx;
  logic [111:0] out_col;

  dct_2d dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .in_row(in_row), .out_valid(out_valid), .out_idx(out_idx), .out_col(out_col)
  );

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  mat_t x, z;
  int   t_first;

  initial begin
    for (int m = 0; m < 8; m++)
      for (int n = 0; n < 8; n++)
        x[m][n] = int'($urandom % 256) - 128;
    dct2d(x, z);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int r = 0; r < 8; r++) begin
      in_valid <= 1'b1;
      for (int n = 0; n < 8; n++) in_row[(7-n)*8 +: 8] <= 8'(x[r][n]);
      do @(negedge clk); while (!in_ready);
      if (r == 0) t_first = cycle;
      @(posedge clk);
    end
    in_valid <= 1'b0;
  end

  initial begin
    @(posedge rst_n);
    for (int p = 0; p < 8; p++) begin
      do @(negedge clk); while (!out_valid);
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (int'($signed(out_col[(7-k)*14 +: 14])) != z[k][p]) begin
          failures++;
          $display("Z[%0d][%0d] = %0d, expected %0d", k, p, $signed(out_col[(7-k)*14 +: 14]), z[k][p]);
        end
      end
    end
    checks++;
    if (cycle - t_first != 101) begin
      failures++;
      $display("block took %0d cycles, expected 101", cycle - t_first);
    end
    $display("block latency %0d cycles", cycle - t_first);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
