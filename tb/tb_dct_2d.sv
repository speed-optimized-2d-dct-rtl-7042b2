// tb_dct_2d: end-to-end test of the 2D DCT core, two-ROM and four-ROM RACs.
//
// Each configuration receives a series of 8x8 blocks: constant extremes
// (-128 and 127), a full-scale checkerboard (largest AC coefficient), a ramp
// and random blocks. Some blocks are sent back to back with the source always
// ready, some with random gaps in the source. Every output column is compared
// bit-exactly with dct_ref_pkg and checked against the real orthonormal DCT
// (times 8) within 40 (0.5% of full scale; the integer cosine weights are not exact). The first block's latency and the block
// period of back-to-back blocks are checked against the cycle counts of the
// design. The test also counts how often each flow-control case happened:
// the row pass pacing the source, the full transpose register holding the
// source off, and the source pausing; a case that never happened fails.
module tb_dct_2d;
  import dct_ref_pkg::*;

  localparam int NBLK = 12;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  int   cycle = 0;
  real  max_err = 0.0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic mat_t make_block(int b, int seed);
    mat_t x;
    for (int m = 0; m < 8; m++)
      for (int n = 0; n < 8; n++)
        case (b)
          0: x[m][n] = -128;
          1: x[m][n] = 127;
          2: x[m][n] = ((m + n) % 2 == 0) ? 127 : -128;
          3: x[m][n] = 16 * n - 100 + 3 * m;
          default: x[m][n] = int'($urandom(seed + 64 * b + 8 * m + n) % 256) - 128;
        endcase
    return x;
  endfunction

  bit done_cfg [2];

  for (genvar g = 0; g < 2; g++) begin : cfg
    localparam int unsigned ROMS = (g == 0) ? 2 : 4;
    localparam int R = (10 + ROMS - 1) / ROMS;    // row RAC period
    localparam int S = (12 + ROMS - 1) / ROMS;    // column RAC period
    localparam int LATENCY = 8 * R + 8 * S + 13;
    localparam int PERIOD  = 8 * R + 7 * S + 8;

    logic         in_valid = 1'b0, in_ready, out_valid;
    logic [63:0]  in_row;
    logic [2:0]   out_idx;
    logic [111:0] out_col;

    dct_2d #(.NUM_ROMS(ROMS)) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
      .in_row(in_row), .out_valid(out_valid), .out_idx(out_idx), .out_col(out_col)
    );

    mat_t blocks [NBLK];
    int   first_take [NBLK];
    int   last_out [NBLK];
    int   n_pace = 0, n_full = 0, n_gap = 0;

    initial for (int b = 0; b < NBLK; b++) blocks[b] = make_block(b, 1234);

    // Source: blocks 0..5 back to back, later blocks with random gaps.
    initial begin
      @(posedge rst_n);
      @(posedge clk);
      for (int b = 0; b < NBLK; b++) begin
        for (int r = 0; r < 8; r++) begin
          if (b >= 6) while ($urandom % 3 == 0) begin
            in_valid <= 1'b0;
            @(posedge clk);
          end
          in_valid <= 1'b1;
          for (int n = 0; n < 8; n++) in_row[(7-n)*8 +: 8] <= 8'(blocks[b][r][n]);
          do @(negedge clk); while (!in_ready);
          if (r == 0) first_take[b] = cycle;
          @(posedge clk);
        end
      end
      in_valid <= 1'b0;
    end

    // Flow-control census.
    always @(negedge clk) if (rst_n) begin
      if (in_valid && !in_ready && dut.rows_in != 4'd8) n_pace++;
      if (in_valid && !in_ready && dut.rows_in == 4'd8) n_full++;
      if (!in_valid && in_ready) n_gap++;
    end

    // Sink: compare every column.
    initial begin
      mat_t z;
      @(posedge rst_n);
      for (int b = 0; b < NBLK; b++) begin
        dct2d(blocks[b], z);
        for (int p = 0; p < 8; p++) begin
          do @(negedge clk); while (!out_valid);
          checks++;
          if (out_idx != 3'(p)) begin
            failures++;
            $display("cfg %0d block %0d: column index %0d, expected %0d", ROMS, b, out_idx, p);
          end
          for (int k = 0; k < 8; k++) begin
            int got;
            real e;
            got = int'($signed(out_col[(7-k)*14 +: 14]));
            e = got - 8.0 * ortho_dct(blocks[b], k, p);
            checks++;
            if (got != z[k][p]) begin
              failures++;
              $display("cfg %0d block %0d Z[%0d][%0d] = %0d, expected %0d",
                       ROMS, b, k, p, got, z[k][p]);
            end
            if (e < 0) e = -e;
            if (e > max_err) max_err = e;
            checks++;
            if (e > 40.0) begin
              failures++;
              $display("cfg %0d block %0d Z[%0d][%0d] = %0d, off the real DCT by %f",
                       ROMS, b, k, p, got, e);
            end
          end
        end
        last_out[b] = cycle;
      end
      // Cycle counts of the undisturbed back-to-back part (blocks 0..5).
      checks++;
      if (last_out[0] - first_take[0] != LATENCY) begin
        failures++;
        $display("cfg %0d latency %0d, expected %0d", ROMS, last_out[0] - first_take[0], LATENCY);
      end
      for (int b = 1; b < 6; b++) begin
        checks++;
        if (first_take[b] - first_take[b-1] != PERIOD) begin
          failures++;
          $display("cfg %0d block period %0d, expected %0d", ROMS, first_take[b] - first_take[b-1], PERIOD);
        end
      end
      $display("cfg %0d: latency %0d cycles, period %0d cycles; pacing %0d, transpose full %0d, source gaps %0d",
               ROMS, last_out[0] - first_take[0], first_take[1] - first_take[0], n_pace, n_full, n_gap);
      checks += 3;
      if (n_pace == 0) begin failures++; $display("cfg %0d: row pacing never happened", ROMS); end
      if (n_full == 0) begin failures++; $display("cfg %0d: transpose-full hold never happened", ROMS); end
      if (n_gap == 0)  begin failures++; $display("cfg %0d: source gap never happened", ROMS); end
      done_cfg[g] = 1'b1;
    end
  end

  initial begin
    wait (done_cfg[0] && done_cfg[1]);
    $display("largest deviation from 8x the orthonormal DCT: %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
