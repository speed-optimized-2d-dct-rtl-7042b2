// tb_dct_rac: drives the RAC of every coefficient with random four-word
// inputs cut into bit planes, with one, two and four planes per cycle, words
// back to back and with idle cycles between them. The finished sum must equal
// the inner product of the words with the coefficient's integer weights,
// three cycles after the last slice.
module tb_dct_rac;
  import dct_ref_pkg::*;

  localparam int W = 12;                  // DA word width (multiple of 1, 2, 4)

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int finished [3];

  for (genvar g = 0; g < 3; g++) begin : cfg
    localparam int P = (g == 0) ? 1 : (g == 1) ? 2 : 4;
    localparam int C = W / P;

    logic        valid = 1'b0, first, last;
    logic [3:0]  addr [P];
    logic signed [19:0] acc [8];
    logic [7:0]  done;
    int          expq [8][$];
    int          ends [$];           // cycle of each word's last slice
    int          cyc = 0;

    always @(posedge clk) cyc <= cyc + 1;

    for (genvar k = 0; k < 8; k++) begin : g_k
      dct_rac #(.K(k), .P(P)) dut (
        .clk(clk), .rst_n(rst_n), .valid(valid), .first(first), .last(last),
        .addr(addr), .acc(acc[k]), .done(done[k])
      );
    end

    initial begin
      logic signed [W-1:0] w [4];
      @(posedge rst_n);
      for (int t = 0; t < 300; t++) begin
        for (int i = 0; i < 4; i++) begin
          w[i] = (t == 0) ? -(2**(W-1)) : (t == 1) ? (2**(W-1)-1) : W'($urandom);
        end
        for (int k = 0; k < 8; k++) begin
          int e;
          e = 0;
          for (int i = 0; i < 4; i++) e += H[k][i] * int'(w[i]);
          expq[k].push_back(e);
        end
        for (int sl = 0; sl < C; sl++) begin
          @(negedge clk);
          valid = 1'b1;
          first = (sl == 0);
          last  = (sl == C - 1);
          for (int j = 0; j < P; j++)
            for (int i = 0; i < 4; i++)
              addr[j][i] = w[i][W - P*(sl+1) + j];
          if (last) ends.push_back(cyc);
        end
        if (t % 3 == 0) begin
          @(negedge clk);
          valid = 1'b0;
          for (int j = 0; j < P; j++) addr[j] = 4'($urandom);
        end
      end
      @(negedge clk);
      valid = 1'b0;
    end

    always @(negedge clk) if (rst_n) begin
      if (done[0]) begin
        int e0;
        checks++;
        e0 = ends.pop_front();
        if (cyc - e0 != 3) begin
          failures++;
          $display("P=%0d: result %0d cycles after the last slice, expected 3", P, cyc - e0);
        end
        for (int k = 0; k < 8; k++) begin
          int e;
          e = expq[k].pop_front();
          checks++;
          if (int'(acc[k]) != e) begin
            failures++;
            $display("P=%0d K=%0d: %0d, expected %0d", P, k, acc[k], e);
          end
        end
        if (expq[0].size() == 0) finished[g] = 1;
      end
      if (done != 8'h00 && done != 8'hff) begin
        failures++;
        $display("P=%0d: done bits disagree %b", P, done);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (finished[0] == 1 && finished[1] == 1 && finished[2] == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
