// tb_dct_butterfly: random and extreme vectors through the full-precision
// (row) and the halving (column) butterfly; sums and differences are checked
// one cycle after the enable, and a cycle without enable must hold them.
module tb_dct_butterfly;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic en;
  logic signed [7:0]  xa [8];
  logic signed [8:0]  sa [4], da [4];
  logic signed [11:0] xb [8];
  logic signed [11:0] sb [4], db [4];

  dct_butterfly #(.IN_W(8),  .SHIFT(0)) dut_row (.clk(clk), .en(en), .x(xa), .s(sa), .d(da));
  dct_butterfly #(.IN_W(12), .SHIFT(1)) dut_col (.clk(clk), .en(en), .x(xb), .s(sb), .d(db));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int got, int exp_v, string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("%s: %0d, expected %0d", what, got, exp_v);
    end
  endtask

  initial begin
    int ia [8], ib [8];
    en = 1'b0;
    for (int t = 0; t < 200; t++) begin
      for (int n = 0; n < 8; n++) begin
        case (t)
          0: begin ia[n] = -128; ib[n] = -2048; end
          1: begin ia[n] = 127;  ib[n] = 2047;  end
          2: begin ia[n] = (n < 4) ? 127 : -128; ib[n] = (n < 4) ? 2047 : -2048; end
          default: begin
            ia[n] = int'($urandom % 256) - 128;
            ib[n] = int'($urandom % 4096) - 2048;
          end
        endcase
        xa[n] = 8'(ia[n]);
        xb[n] = 12'(ib[n]);
      end
      en = 1'b1;
      @(posedge clk); #1;
      for (int i = 0; i < 4; i++) begin
        check(int'(sa[i]), ia[i] + ia[7-i], "row sum");
        check(int'(da[i]), ia[i] - ia[7-i], "row difference");
        check(int'(sb[i]), (ib[i] + ib[7-i]) >>> 1, "column sum");
        check(int'(db[i]), (ib[i] - ib[7-i]) >>> 1, "column difference");
      end
      // Hold: change the inputs with en low, outputs must not move.
      en = 1'b0;
      for (int n = 0; n < 8; n++) begin xa[n] = ~xa[n]; xb[n] = ~xb[n]; end
      @(posedge clk); #1;
      check(int'(sa[0]), ia[0] + ia[7], "row sum held");
      check(int'(db[3]), (ib[3] - ib[4]) >>> 1, "column difference held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
