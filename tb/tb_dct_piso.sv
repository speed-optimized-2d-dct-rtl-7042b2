// tb_dct_piso: loads random words into the two-plane (10-bit) and the
// four-plane (12-bit) serialiser and checks every address slice, MSB first,
// against bits picked out of the loaded words.
module tb_dct_piso;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic load, shift;
  logic [9:0]  w2 [4];
  logic [11:0] w4 [4];
  logic [3:0]  a2 [2];
  logic [3:0]  a4 [4];

  dct_piso #(.W(10), .P(2)) dut2 (.clk(clk), .load(load), .shift(shift), .word(w2), .addr(a2));
  dct_piso #(.W(12), .P(4)) dut4 (.clk(clk), .load(load), .shift(shift), .word(w4), .addr(a4));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0]  k2 [4];
    logic [11:0] k4 [4];
    load = 1'b0; shift = 1'b0;
    for (int t = 0; t < 100; t++) begin
      for (int i = 0; i < 4; i++) begin
        k2[i] = 10'($urandom); k4[i] = 12'($urandom);
        w2[i] = k2[i]; w4[i] = k4[i];
      end
      load = 1'b1;
      @(posedge clk); #1;
      load = 1'b0; shift = 1'b1;
      for (int sl = 0; sl < 6; sl++) begin
        if (sl < 5)
          for (int j = 0; j < 2; j++) begin
            logic [3:0] e;
            for (int i = 0; i < 4; i++) e[i] = k2[i][9 - 2*sl - (1-j)];
            checks++;
            if (a2[j] !== e) begin
              failures++;
              $display("P=2 slice %0d plane %0d: %b, expected %b", sl, j, a2[j], e);
            end
          end
        if (sl < 3)
          for (int j = 0; j < 4; j++) begin
            logic [3:0] e;
            for (int i = 0; i < 4; i++) e[i] = k4[i][11 - 4*sl - (3-j)];
            checks++;
            if (a4[j] !== e) begin
              failures++;
              $display("P=4 slice %0d plane %0d: %b, expected %b", sl, j, a4[j], e);
            end
          end
        // Randomly stall one cycle: with shift low the slice must stay.
        if ($urandom % 4 == 0) begin
          shift = 1'b0;
          @(posedge clk); #1;
          shift = 1'b1;
        end
        @(posedge clk); #1;
      end
      shift = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
