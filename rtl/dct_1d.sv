// dct_1d: 8-point 1D DCT by distributed arithmetic (one row or column pass).
//
// Datapath: an input register takes all eight samples at once; the butterfly
// forms four sums and four differences; two parallel-in serial-out registers
// (one for the sums, one for the differences) cut them into bit planes, MSB
// first, P planes per cycle; eight RACs, one per coefficient, accumulate the
// inner products (RAC0..RAC7 = X0, X2, X4, X6, X1, X3, X5, X7, as in the
// reference architecture); finally each result is rounded (add half an LSB,
// arithmetic shift right by RND_SHIFT) to OUT_W bits and registered in
// ascending coefficient order.
//
// The DA word is the butterfly output, with a zero appended below it when
// APPEND_ZERO = 1 (this makes the 9-bit row word 10 bits, an even number of
// planes; ROM word 0 is zero so the extra plane costs no accuracy), then
// sign-extended on top to a multiple of P. A word therefore takes
// SLICES = ceil(DA_W / P) cycles: 5 (row pass) and 6 (column pass) with two
// ROMs per RAC, 3 and 3 with four.
//
// Interface: in_ready is high when a new vector may be taken; a vector is
// taken when in_valid and in_ready are both high, and in_ready then stays low
// for SLICES-1 cycles, so vectors enter at most one per SLICES cycles. Each
// vector comes out, coefficients in ascending order X0..X7, with out_valid
// high for one cycle, SLICES+6 cycles after the cycle in which it was taken
// (11 for the 2-ROM row pass). Output k is
// round(sum_i coef(k,i) * w_i / 2^RND_SHIFT), w_i being the DA word.
module dct_1d
  import dct_pkg::*;
#(
  parameter int unsigned IN_W        = 8,   // input sample width
  parameter int unsigned BF_SHIFT    = 0,   // 1: halve butterfly outputs
  parameter int unsigned APPEND_ZERO = 1,   // 1: append a zero LSB to the DA word
  parameter int unsigned P           = 2,   // bit planes per cycle (ROMs per RAC)
  parameter int unsigned OUT_W       = 12,  // output coefficient width
  parameter int unsigned RND_SHIFT   = 6    // accumulator bits dropped by rounding
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic signed [IN_W-1:0]    in_x [N],
  output logic                      out_valid,
  output logic signed [OUT_W-1:0]   out_y [N]
);

  localparam int unsigned BF_W   = IN_W + 1 - BF_SHIFT;
  localparam int unsigned DA_W   = BF_W + APPEND_ZERO;
  localparam int unsigned SLICES = slices(DA_W, P);
  localparam int unsigned DA_WP  = SLICES * P;
  localparam int unsigned CNT_W  = $clog2(SLICES + 1);

  // ---- input register -------------------------------------------------
  logic signed [IN_W-1:0] x_q [N];
  logic                   take, v_in, v_bf;
  logic [CNT_W-1:0]       cool;

  assign in_ready = (cool == '0);
  assign take     = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (take) x_q <= in_x;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cool <= '0;
      v_in <= 1'b0;
      v_bf <= 1'b0;
    end else begin
      if (take)              cool <= CNT_W'(SLICES - 1);
      else if (cool != '0)   cool <= cool - 1'b1;
      v_in <= take;
      v_bf <= v_in;
    end
  end

  // ---- butterfly ------------------------------------------------------
  logic signed [BF_W-1:0] bs [HALF];
  logic signed [BF_W-1:0] bd [HALF];

  dct_butterfly #(.IN_W(IN_W), .SHIFT(BF_SHIFT)) u_bf (
    .clk(clk), .en(v_in), .x(x_q), .s(bs), .d(bd)
  );

  // ---- serialisation --------------------------------------------------
  logic [DA_WP-1:0]  ws [HALF];
  logic [DA_WP-1:0]  wd [HALF];
  logic [HALF-1:0]   addr_s [P];
  logic [HALF-1:0]   addr_d [P];
  logic              sl_valid;
  logic [CNT_W-1:0]  sl_cnt;
  logic              sl_first, sl_last;

  always_comb begin
    for (int unsigned i = 0; i < HALF; i++) begin
      ws[i] = DA_WP'(signed'({bs[i], {APPEND_ZERO{1'b0}}}));
      wd[i] = DA_WP'(signed'({bd[i], {APPEND_ZERO{1'b0}}}));
    end
  end

  dct_piso #(.W(DA_WP), .P(P)) u_piso_even (
    .clk(clk), .load(v_bf), .shift(sl_valid), .word(ws), .addr(addr_s)
  );
  dct_piso #(.W(DA_WP), .P(P)) u_piso_odd (
    .clk(clk), .load(v_bf), .shift(sl_valid), .word(wd), .addr(addr_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sl_valid <= 1'b0;
      sl_cnt   <= '0;
    end else if (v_bf) begin
      sl_valid <= 1'b1;
      sl_cnt   <= '0;
    end else if (sl_valid) begin
      sl_cnt   <= sl_cnt + 1'b1;
      if (sl_last) sl_valid <= 1'b0;
    end
  end

  assign sl_first = (sl_cnt == '0);
  assign sl_last  = (sl_cnt == CNT_W'(SLICES - 1));

  // ---- RACs, one per coefficient ---------------------------------------
  // RAC0..RAC3 compute X0, X2, X4, X6 from the sums, RAC4..RAC7 compute
  // X1, X3, X5, X7 from the differences.
  logic signed [ACC_W-1:0] acc [N];     // indexed by RAC
  logic [N-1:0]            done;

  function automatic int unsigned rac_coef(int unsigned r);
    return (r < HALF) ? 2 * r : 2 * (r - HALF) + 1;
  endfunction

  for (genvar r = 0; r < N; r++) begin : g_rac
    logic [HALF-1:0] addr [P];
    always_comb addr = (r < HALF) ? addr_s : addr_d;
    dct_rac #(.K(rac_coef(r)), .P(P)) u_rac (
      .clk(clk), .rst_n(rst_n),
      .valid(sl_valid), .first(sl_first), .last(sl_last),
      .addr(addr), .acc(acc[r]), .done(done[r])
    );
  end

  // ---- rounding, reordering to X0..X7, output register --------------------
  always_ff @(posedge clk) begin
    if (&done) begin
      for (int unsigned r = 0; r < N; r++)
        out_y[rac_coef(r)] <= OUT_W'((acc[r] + (ACC_W)'(1 << (RND_SHIFT - 1))) >>> RND_SHIFT);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= &done;
  end

endmodule
