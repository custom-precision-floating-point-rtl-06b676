// fp_addsub: combinational floating-point adder/subtractor for the custom
// (EXP_W, MAN_W) format also used by fp_mult. op = 0 gives a + b, op = 1
// gives a - b.
//
// The operand of larger magnitude is kept, the other one is shifted right by
// the exponent difference into a window MAN_W+3 bits wider than the
// significand, and the bits shifted out are folded into a sticky bit. After
// the add or subtract the result is normalised with a leading-zero count and
// rounded to nearest, ties to even. The extra window bits make the rounding
// exact: a large cancellation only happens for shifts of zero or one, which
// lose no bits. Range rules are this design's own, the same as fp_mult:
// subnormals in and out are zero, overflow gives infinity, an exact zero
// difference is +0, inf - inf and NaN inputs give the quiet NaN.
// Interface: a, b, op in, s out, no clock.
module fp_addsub #(
  parameter int EXP_W = 8,
  parameter int MAN_W = 23
) (
  input  logic [EXP_W+MAN_W:0] a,
  input  logic [EXP_W+MAN_W:0] b,
  input  logic                 op,
  output logic [EXP_W+MAN_W:0] s
);
  localparam int FW   = EXP_W + MAN_W + 1;
  localparam int SW   = MAN_W + 1;             // significand width
  localparam int XW   = 2 * SW + 2;            // significand + MAN_W+3 low bits
  localparam int EMAX = (1 << EXP_W) - 1;
  localparam int EXW  = EXP_W + 2;             // signed exponent arithmetic

  logic             sa, sb, sl, ss, sr;
  logic [EXP_W-1:0] ea, eb, el, es;
  logic [MAN_W-1:0] ma, mb, ml, ms;
  logic             za, zb, ia, ib, na, nb, swap, eff_sub;
  logic [EXP_W-1:0] d;
  logic [XW-1:0]    big_sig, sml_sig, shifted;
  logic             lost;
  logic [XW:0]      sum;
  int               lz;
  logic [XW:0]      norm;
  logic [SW:0]      kept;
  logic             guard, sticky, rnd_up;
  logic signed [EXW-1:0] e_res;

  always_comb begin
    {sa, ea, ma} = a;
    {sb, eb, mb} = b;
    sb = sb ^ op;
    za = (ea == '0);
    zb = (eb == '0);
    ia = (ea == EXP_W'(EMAX)) && (ma == '0);
    ib = (eb == EXP_W'(EMAX)) && (mb == '0);
    na = (ea == EXP_W'(EMAX)) && (ma != '0);
    nb = (eb == EXP_W'(EMAX)) && (mb != '0);

    swap = {eb, mb} > {ea, ma};
    {sl, el, ml} = swap ? {sb, eb, mb} : {sa, ea, ma};
    {ss, es, ms} = swap ? {sa, ea, ma} : {sb, eb, mb};
    eff_sub = sl ^ ss;
    d = el - es;

    big_sig   = {1'b1, ml, {(XW-SW){1'b0}}};
    sml_sig = {1'b1, ms, {(XW-SW){1'b0}}};
    if (32'(d) >= XW) begin
      shifted = '0;
      lost    = 1'b1;
    end else begin
      shifted = sml_sig >> d;
      lost    = |(sml_sig & ((XW'(1) << d) - 1'b1));
    end
    shifted[0] = shifted[0] | lost;

    sum = eff_sub ? ({1'b0, big_sig} - {1'b0, shifted}) : ({1'b0, big_sig} + {1'b0, shifted});

    // leading-zero count: position of the highest set bit of sum
    lz = 0;
    for (int i = 0; i <= XW; i++)
      if (sum[i]) lz = XW - i;
    norm = sum << lz;   // leading one now at bit XW

    kept   = {1'b0, norm[XW -: SW]};
    guard  = norm[XW-SW];
    sticky = |norm[XW-SW-1:0];
    rnd_up = guard && (sticky || kept[0]);
    kept   = kept + (SW+1)'(rnd_up);
    // bit XW of sum has weight 2^(el-bias+1)
    e_res  = EXW'(signed'({2'b00, el})) + EXW'(1) - EXW'(lz);
    if (kept[SW]) begin
      kept  = kept >> 1;
      e_res = e_res + 1'b1;
    end
    sr = sl;

    if (na || nb || (ia && ib && (sa != sb)))
      s = {1'b0, {EXP_W{1'b1}}, 1'b1, {(MAN_W-1){1'b0}}};
    else if (ia)
      s = {sa, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
    else if (ib)
      s = {sb, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
    else if (za && zb)
      s = {sa & sb, {(FW-1){1'b0}}};
    else if (zb)
      s = {sa, ea, ma};
    else if (za)
      s = {sb, eb, mb};
    else if (sum == '0)
      s = '0;
    else if (e_res <= 0)
      s = {sr, {(FW-1){1'b0}}};
    else if (e_res >= EXW'(EMAX))
      s = {sr, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
    else
      s = {sr, e_res[EXP_W-1:0], kept[MAN_W-1:0]};
  end
endmodule
