// tb_dct_transpose: shifts in eight random rows of 12-bit words, reads all
// eight columns through the multiplexers and checks col[n] = row n, word p;
// then checks that the register holds its content while shift is low and
// that a second block replaces the first completely.
module tb_dct_transpose;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic shift = 1'b0;
  logic signed [11:0] row [8];
  logic [2:0]         sel;
  logic signed [11:0] col [8];

  dct_transpose #(.W(12)) dut (.clk(clk), .shift(shift), .row(row), .sel(sel), .col(col));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [11:0] m [8][8];
    for (int blk = 0; blk < 4; blk++) begin
      for (int r = 0; r < 8; r++) begin
        @(negedge clk);
        shift = 1'b1;
        for (int k = 0; k < 8; k++) begin
          m[r][k] = 12'($urandom);
          row[k] = m[r][k];
        end
      end
      @(negedge clk);
      shift = 1'b0;
      for (int k = 0; k < 8; k++) row[k] = 12'($urandom);
      repeat (2) @(negedge clk);            // idle: content must hold
      for (int p = 0; p < 8; p++) begin
        sel = 3'(7 - ((p + blk) % 8));       // read in a scrambled order
        #1;
        for (int n = 0; n < 8; n++) begin
          checks++;
          if (col[n] !== m[n][sel]) begin
            failures++;
            $display("block %0d column %0d element %0d: %0d, expected %0d", blk, sel, n, col[n], m[n][sel]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
