// tb_dct_rom: checks all 16 words of all eight DA ROMs against sums of the
// integer cosine weights taken from the reference matrix.
module tb_dct_rom;
  import dct_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [3:0] addr;
  logic signed [9:0] data [8];

  for (genvar k = 0; k < 8; k++) begin : g
    dct_rom #(.K(k)) dut (.addr(addr), .data(data[k]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      addr = 4'(a);
      #1;
      for (int k = 0; k < 8; k++) begin
        int exp_v;
        exp_v = 0;
        // Butterfly output i carries weight H[k][i] (first half of row k).
        for (int i = 0; i < 4; i++) if (a[i]) exp_v += H[k][i];
        checks++;
        if (int'(data[k]) != exp_v) begin
          failures++;
          $display("ROM %0d addr %0d: %0d, expected %0d", k, a, data[k], exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
