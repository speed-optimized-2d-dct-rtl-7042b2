// dct_piso: parallel-in serial-out registers that turn four butterfly outputs
// into DA ROM addresses.
//
// On load the four W-bit words are captured; on every shift they move P bits
// towards the MSB. The top P bits of each word form the current slice, MSB
// first: addr[j] holds bit (W-P+j) of the four words, so addr[P-1] is the
// more significant bit plane of the slice and, in the first slice after a
// load, the sign plane. W must be a multiple of P (the caller sign-extends).
// Timing: slice 0 is on addr the cycle after load; one slice per shift.
module dct_piso
  import dct_pkg::*;
#(
  parameter int unsigned W = 10,
  parameter int unsigned P = 2
) (
  input  logic                 clk,
  input  logic                 load,
  input  logic                 shift,
  input  logic [W-1:0]         word [HALF],
  output logic [HALF-1:0]      addr [P]
);

  logic [W-1:0] sr [HALF];

  always_ff @(posedge clk) begin
    for (int unsigned i = 0; i < HALF; i++) begin
      if (load)       sr[i] <= word[i];
      else if (shift) sr[i] <= sr[i] << P;
    end
  end

  always_comb begin
    for (int unsigned j = 0; j < P; j++)
      for (int unsigned i = 0; i < HALF; i++)
        addr[j][i] = sr[i][W-P+j];
  end

  initial assert (W % P == 0) else $error("dct_piso: W must be a multiple of P");

endmodule
