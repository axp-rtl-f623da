// fp_add: combinational IEEE 754 floating-point adder, the arithmetic core of the
// accumulator.
//
// The operands are ordered by magnitude, the smaller significand is shifted right
// by the exponent difference while guard, round and sticky bits are kept, the
// significands are added or subtracted, the sum is normalised with a leading-zero
// count and rounded to nearest, ties to even. Special cases follow the same rules
// as fp_mul: subnormal operands read as zero, results below the normal range flush
// to zero, overflow gives infinity, NaN (or infinity minus infinity) gives the
// quiet NaN with a clear sign. An exact cancellation gives +0. The widths select
// the format (8/23 single, 5/10 half precision). The algorithm is this design's
// choice; the processing element only needs an adder that fits one stage.
module fp_add #(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23,
  localparam int unsigned W    = 1 + EXP_W + MAN_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  localparam int unsigned SW = MAN_W + 4;                      // 1 hidden + fraction + guard/round/sticky
  localparam logic signed [EXP_W+1:0] EMAX = (1 << EXP_W) - 1;

  logic               sa, sb, sl, ss;
  logic [EXP_W-1:0]   ea, eb, el, es;
  logic [MAN_W-1:0]   ma, mb, ml, ms;
  logic               a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [EXP_W-1:0]   d;
  logic [2*SW-1:0]    shifted;
  logic [SW-1:0]      mag_l, mag_s;
  logic [SW:0]        sum;
  logic [SW-1:0]      norm;
  int unsigned        lz;
  logic               round_up;
  logic [MAN_W:0]     frac_r;
  logic signed [EXP_W+1:0] e;

  always_comb begin
    {sa, ea, ma} = a;
    {sb, eb, mb} = b;
    a_zero = (ea == '0);
    b_zero = (eb == '0);
    a_inf  = (ea == '1) && (ma == '0);
    b_inf  = (eb == '1) && (mb == '0);
    a_nan  = (ea == '1) && (ma != '0);
    b_nan  = (eb == '1) && (mb != '0);

    // larger magnitude first
    if ({ea, ma} >= {eb, mb}) begin
      {sl, el, ml} = a; {ss, es, ms} = b;
    end else begin
      {sl, el, ml} = b; {ss, es, ms} = a;
    end
    d     = el - es;
    mag_l   = {1'b1, ml, 3'b000};
    mag_s = {1'b1, ms, 3'b000};
    if (d >= EXP_W'(SW)) shifted = {{SW{1'b0}}, {SW-1{1'b0}}, 1'b1}; // all shifted out: sticky only
    else                 shifted = {mag_s, {SW{1'b0}}} >> d;
    mag_s = {shifted[2*SW-1 -: SW-1], shifted[SW] | (|shifted[SW-1:0])};

    if (sl ^ ss) sum = {1'b0, mag_l} - {1'b0, mag_s};
    else         sum = {1'b0, mag_l} + {1'b0, mag_s};

    e    = $signed({2'b00, el});
    lz   = 0;
    norm = '0;
    if (sum[SW]) begin
      norm = {sum[SW:2], sum[1] | sum[0]};
      e    = e + 1;
    end else begin
      for (int i = 0; i < SW; i++)
        if (sum[i]) lz = SW - 1 - i;                          // last hit is the highest one
      norm = sum[SW-1:0] << lz;
      e    = e - $signed((EXP_W+2)'(lz));
    end
    // norm: [SW-1] hidden one, [SW-2:3] fraction, [2] guard, [1:0] round/sticky
    round_up = norm[2] & (norm[1] | norm[0] | norm[3]);
    frac_r   = {1'b0, norm[SW-2:3]} + (MAN_W+1)'(round_up);
    if (frac_r[MAN_W]) e = e + 1;

    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb)))
      y = {1'b0, {EXP_W{1'b1}}, 1'b1, {(MAN_W-1){1'b0}}};
    else if (a_inf)
      y = a;
    else if (b_inf)
      y = b;
    else if (a_zero && b_zero)
      y = {sa & sb, {(W-1){1'b0}}};
    else if (a_zero)
      y = b;
    else if (b_zero)
      y = a;
    else if (sum == '0)
      y = '0;
    else if (e <= 0)
      y = {sl, {(W-1){1'b0}}};
    else if (e >= EMAX)
      y = {sl, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
    else
      y = {sl, e[EXP_W-1:0], frac_r[MAN_W-1:0]};
  end

endmodule
