// tb_dct_1d: the 1D DCT in its two roles, as the row pass (8-bit in, 12-bit
// out) and as the column pass (12-bit in, halved butterfly, 14-bit out), with
// two and with four ROMs per RAC. Vectors arrive at the highest rate the
// block accepts and, later, with random gaps. Each output vector is compared
// with dct_ref_pkg; the spacing of accepted vectors (the RAC period: 5, 6, 3,
// 3 cycles) and the latency (period + 6 cycles) are checked.
module tb_dct_1d;
  import dct_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  int   cycle = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NVEC = 200;
  int finished [4];

  for (genvar g = 0; g < 4; g++) begin : cfg
    localparam int  P      = (g % 2 == 0) ? 2 : 4;
    localparam bit  COL    = (g >= 2);
    localparam int  IN_W   = COL ? 12 : 8;
    localparam int  OUT_W  = COL ? 14 : 12;
    localparam int  DA_W   = COL ? 12 : 10;
    localparam int  PERIOD = (DA_W + P - 1) / P;

    logic in_valid = 1'b0, in_ready, out_valid;
    logic signed [IN_W-1:0]  in_x [8];
    logic signed [OUT_W-1:0] out_y [8];
    int   expq [$];                  // eight expected coefficients per vector
    int   takes [$];
    int   last_take = -1;

    dct_1d #(
      .IN_W(IN_W), .BF_SHIFT(COL ? 1 : 0), .APPEND_ZERO(COL ? 0 : 1),
      .P(P), .OUT_W(OUT_W), .RND_SHIFT(6)
    ) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
      .in_x(in_x), .out_valid(out_valid), .out_y(out_y)
    );

    initial begin
      int v [8], y [8];
      @(posedge rst_n);
      for (int t = 0; t < NVEC; t++) begin
        if (t >= NVEC / 2) while ($urandom % 3 == 0) begin
          in_valid <= 1'b0;
          @(posedge clk);
        end
        for (int n = 0; n < 8; n++) begin
          if (COL) begin
            // Row-pass results lie within -2048..2047.
            v[n] = (t == 0) ? -2048 : (t == 1) ? 2047 : int'($urandom % 4096) - 2048;
          end else begin
            v[n] = (t == 0) ? -128 : (t == 1) ? 127 : int'($urandom % 256) - 128;
          end
          in_x[n] <= IN_W'(v[n]);
        end
        if (COL) col_pass(v, y); else row_pass(v, y);
        for (int k = 0; k < 8; k++) expq.push_back(y[k]);
        in_valid <= 1'b1;
        do @(negedge clk); while (!in_ready);
        takes.push_back(cycle);
        if (t > 0 && t < NVEC / 2) begin
          checks++;
          if (cycle - last_take != PERIOD) begin
            failures++;
            $display("P=%0d col=%0d: vectors %0d cycles apart, expected %0d", P, COL, cycle - last_take, PERIOD);
          end
        end
        last_take = cycle;
        @(posedge clk);
      end
      in_valid <= 1'b0;
    end

    initial begin
      int e;
      int t0;
      @(posedge rst_n);
      for (int t = 0; t < NVEC; t++) begin
        do @(negedge clk); while (!out_valid);
        t0 = takes.pop_front();
        checks++;
        if (cycle - t0 != PERIOD + 6) begin
          failures++;
          $display("P=%0d col=%0d: latency %0d, expected %0d", P, COL, cycle - t0, PERIOD + 6);
        end
        for (int k = 0; k < 8; k++) begin
          e = expq.pop_front();
          checks++;
          if (int'(out_y[k]) != e) begin
            failures++;
            $display("P=%0d col=%0d vector %0d X%0d = %0d, expected %0d", P, COL, t, k, out_y[k], e);
          end
        end
      end
      finished[g] = 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (finished[0] == 1 && finished[1] == 1 && finished[2] == 1 && finished[3] == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
