// dct_rac: ROM and accumulator (RAC) computing one DCT coefficient by
// distributed arithmetic, P bit planes per cycle.
//
// Each cycle a slice of P bit planes arrives, MSB first, each plane being a
// 4-bit address (one bit of each of the four butterfly outputs). P copies of
// the coefficient ROM are read in parallel: with P = 2 the even-indexed and
// the odd-indexed bit plane of the slice, with P = 4 four consecutive planes.
// The ROM outputs are weighted by their position in the slice (plane j is
// shifted left by j) and added into a partial sum; the accumulator then
// shifts its feedback left by P and adds the partial sum. The inputs are two's
// complement, so in the first slice the most significant plane (the sign
// plane) is subtracted rather than added. P = 1 gives the plain one-bit-per-
// cycle RAC.
//
// Pipeline: ROM read register, partial-sum register, accumulator, so a slice
// reaches the accumulator three cycles after it is presented. done is high
// for one cycle, the cycle in which acc holds a finished sum; acc keeps it
// until the next word's first slice reaches the accumulator. Slices of
// consecutive words may follow back to back.
// The accumulator is ACC_W = 20 bits as in the reference design; the ROM and
// accumulator widths follow it, the register between ROM and adder is this
// design's choice for speed.
module dct_rac
  import dct_pkg::*;
#(
  parameter int unsigned K = 0,           // coefficient index 0..7
  parameter int unsigned P = 2            // bit planes (ROM copies) per cycle
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      valid,   // a slice is on addr
  input  logic                      first,   // slice holds the sign plane
  input  logic                      last,    // slice holds the LSB plane
  input  logic [HALF-1:0]           addr [P],
  output logic signed [ACC_W-1:0]   acc,
  output logic                      done
);

  localparam int unsigned PS_W = ROM_W + P + 1;

  logic signed [ROM_W-1:0] rom_d [P];
  logic signed [ROM_W:0]   rom_q [P];
  logic                    a_valid, a_first, a_last;
  logic signed [PS_W-1:0]  psum;
  logic                    b_valid, b_first, b_last;

  for (genvar j = 0; j < P; j++) begin : g_rom
    dct_rom #(.K(K)) u_rom (.addr(addr[j]), .data(rom_d[j]));
  end

  // Stage A: ROM read, sign plane negated.
  always_ff @(posedge clk) begin
    for (int unsigned j = 0; j < P; j++)
      if (first && j == P - 1) rom_q[j] <= -(ROM_W+1)'(rom_d[j]);
      else                     rom_q[j] <=  (ROM_W+1)'(rom_d[j]);
  end

  // Stage B: weight the planes of the slice and add them.
  always_ff @(posedge clk) begin
    logic signed [PS_W-1:0] t;
    t = '0;
    for (int unsigned j = 0; j < P; j++)
      t += PS_W'(rom_q[j]) <<< j;
    psum <= t;
  end

  // Stage C: scaling accumulator.
  always_ff @(posedge clk) begin
    if (b_valid) begin
      if (b_first) acc <= ACC_W'(psum);
      else         acc <= (acc <<< P) + ACC_W'(psum);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_valid <= 1'b0; a_first <= 1'b0; a_last <= 1'b0;
      b_valid <= 1'b0; b_first <= 1'b0; b_last <= 1'b0;
      done    <= 1'b0;
    end else begin
      a_valid <= valid;   a_first <= valid & first;   a_last <= valid & last;
      b_valid <= a_valid; b_first <= a_first;         b_last <= a_last;
      done    <= b_valid & b_last;
    end
  end

endmodule
