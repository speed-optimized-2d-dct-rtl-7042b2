// dct_rom: distributed-arithmetic ROM of one DCT coefficient.
//
// A 16-word table addressed by one bit from each of the four butterfly
// outputs that feed coefficient X_K (bit i of addr belongs to butterfly
// output i). Each word is the sum of the integer cosine weights whose address
// bit is set, so the table replaces the four multipliers of an inner product
// that distributed arithmetic evaluates one bit plane at a time. Word 0 is
// zero, which is what lets a zero bit be appended below the data for free.
//
// The words are 10-bit two's complement: the largest sum, 4*64 = 256 for X0,
// needs ten signed bits. The table is computed at elaboration from
// dct_pkg::rom_word; the read is combinational (the RAC registers it).
module dct_rom
  import dct_pkg::*;
#(
  parameter int unsigned K = 0            // coefficient index 0..7
) (
  input  logic [HALF-1:0]          addr,
  output logic signed [ROM_W-1:0]  data
);

  localparam int unsigned WORDS = 1 << HALF;

  function automatic logic [WORDS*ROM_W-1:0] build_table();
    logic [WORDS*ROM_W-1:0] t;
    for (int unsigned a = 0; a < WORDS; a++)
      t[a*ROM_W +: ROM_W] = ROM_W'(rom_word(3'(K), HALF'(a)));
    return t;
  endfunction

  localparam logic [WORDS*ROM_W-1:0] TABLE = build_table();

  assign data = TABLE[addr*ROM_W +: ROM_W];

endmodule
