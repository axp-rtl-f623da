// fp_mul: IEEE 754 floating-point multiplier with a registered output.
//
// This is the arithmetic path of the processing element, used whenever the
// associative memory misses. The exponent and fraction widths select the format:
// 8/23 gives single precision (the element's main format), 5/10 half precision.
// The significands are multiplied in full, the product is normalised by at most
// one position and rounded to nearest, ties to even. Subnormal operands are read
// as zero and results below the normal range are flushed to a signed zero; an
// overflow gives infinity; NaN operands and infinity times zero give the quiet NaN
// with a clear sign bit and only the top fraction bit set.
//
// Timing: one cycle. When en is high the product of a and b is written to y at
// the clock edge; when en is low y holds, so the multiplier register does not
// switch (the clock-gating enable of the processing element). The internal
// structure and pipeline depth of the multiplier are this design's choices: the
// element only needs a multiplier that fits one of its pipeline stages.
module fp_mul #(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23,
  localparam int unsigned W    = 1 + EXP_W + MAN_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  localparam int unsigned PW = 2 * (MAN_W + 1);               // significand product width
  localparam logic signed [EXP_W+1:0] BIAS = (1 << (EXP_W - 1)) - 1;
  localparam logic signed [EXP_W+1:0] EMAX = (1 << EXP_W) - 1; // all-ones exponent

  logic               sa, sb, sy;
  logic [EXP_W-1:0]   ea, eb;
  logic [MAN_W-1:0]   ma, mb;
  logic               a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [PW-1:0]      prod;
  logic [MAN_W-1:0]   frac;
  logic               guard, sticky, round_up;
  logic [MAN_W:0]     frac_r;                                  // fraction after rounding, with carry
  logic signed [EXP_W+1:0] e;
  logic [W-1:0]       y_d;

  always_comb begin
    {sa, ea, ma} = a;
    {sb, eb, mb} = b;
    sy     = sa ^ sb;
    a_zero = (ea == '0);                                       // zero or subnormal
    b_zero = (eb == '0);
    a_inf  = (ea == '1) && (ma == '0);
    b_inf  = (eb == '1) && (mb == '0);
    a_nan  = (ea == '1) && (ma != '0);
    b_nan  = (eb == '1) && (mb != '0);

    prod = PW'({1'b1, ma}) * PW'({1'b1, mb});
    e    = $signed({2'b00, ea}) + $signed({2'b00, eb}) - BIAS;
    if (prod[PW-1]) begin
      // product in [2,4): leading one at the top bit
      frac   = prod[PW-2 -: MAN_W];
      guard  = prod[PW-2-MAN_W];
      sticky = |prod[PW-3-MAN_W:0];
      e      = e + 1;
    end else begin
      frac   = prod[PW-3 -: MAN_W];
      guard  = prod[PW-3-MAN_W];
      sticky = |prod[PW-4-MAN_W:0];
    end
    round_up = guard & (sticky | frac[0]);
    frac_r   = {1'b0, frac} + (MAN_W+1)'(round_up);
    if (frac_r[MAN_W]) e = e + 1;                              // 1.11..1 rounded up to 10.0

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      y_d = {1'b0, {EXP_W{1'b1}}, 1'b1, {(MAN_W-1){1'b0}}};
    else if (a_inf || b_inf)
      y_d = {sy, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
    else if (a_zero || b_zero || e <= 0)
      y_d = {sy, {(W-1){1'b0}}};
    else if (e >= EMAX)
      y_d = {sy, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
    else
      y_d = {sy, e[EXP_W-1:0], frac_r[MAN_W-1:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  y <= '0;
    else if (en) y <= y_d;
  end

endmodule
