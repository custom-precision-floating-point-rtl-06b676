// fp_mult: combinational floating-point multiplier for a custom format with
// EXP_W exponent bits and MAN_W stored mantissa bits (IEEE-754 layout:
// {sign, biased exponent, fraction}, bias 2^(EXP_W-1)-1, hidden leading one).
//
// The significands {1,fraction} are multiplied exactly, the product is
// normalised by at most one position and rounded to MAN_W fraction bits with
// round-to-nearest, ties-to-even, as the design requires of every arithmetic
// unit. Range handling is this design's own choice, kept small on purpose:
//  - subnormal inputs are read as zero, and a result whose exponent after
//    rounding falls below the normal range is flushed to a signed zero;
//  - a result above the largest finite value becomes a signed infinity;
//  - NaN in, or infinity times zero, gives the quiet NaN {s,1..1,10..0}.
// Interface: a, b in, p out, no clock; result is valid in the same cycle.
module fp_mult #(
  parameter int EXP_W = 8,
  parameter int MAN_W = 23
) (
  input  logic [EXP_W+MAN_W:0] a,
  input  logic [EXP_W+MAN_W:0] b,
  output logic [EXP_W+MAN_W:0] p
);
  localparam int FW   = EXP_W + MAN_W + 1;
  localparam int SW   = MAN_W + 1;            // significand width
  localparam int BIAS = (1 << (EXP_W - 1)) - 1;
  localparam int EMAX = (1 << EXP_W) - 1;     // all-ones exponent

  logic              sa, sb, sp;
  logic [EXP_W-1:0]  ea, eb;
  logic [MAN_W-1:0]  ma, mb;
  logic              za, zb, ia, ib, na, nb;
  logic [2*SW-1:0]   prod;
  logic [SW:0]       kept;      // SW significant bits plus a carry bit
  logic              guard, sticky, rnd_up;
  logic signed [EXP_W+2:0] e_unb;

  always_comb begin
    {sa, ea, ma} = a;
    {sb, eb, mb} = b;
    sp = sa ^ sb;
    za = (ea == '0);
    zb = (eb == '0);
    ia = (ea == EXP_W'(EMAX)) && (ma == '0);
    ib = (eb == EXP_W'(EMAX)) && (mb == '0);
    na = (ea == EXP_W'(EMAX)) && (ma != '0);
    nb = (eb == EXP_W'(EMAX)) && (mb != '0);

    prod  = {1'b1, ma} * {1'b1, mb};
    e_unb = (EXP_W+3)'(signed'({3'b000, ea})) + (EXP_W+3)'(signed'({3'b000, eb}))
            - (EXP_W+3)'(BIAS);
    if (prod[2*SW-1]) begin
      kept   = {1'b0, prod[2*SW-1 -: SW]};
      guard  = prod[SW-1];
      sticky = |prod[SW-2:0];
      e_unb  = e_unb + 1'b1;
    end else begin
      kept   = {1'b0, prod[2*SW-2 -: SW]};
      guard  = prod[SW-2];
      sticky = |prod[SW-3:0];   // MAN_W >= 2 assumed
    end
    rnd_up = guard && (sticky || kept[0]);
    kept   = kept + (SW+1)'(rnd_up);
    if (kept[SW]) begin
      kept  = kept >> 1;
      e_unb = e_unb + 1'b1;
    end

    if (na || nb || (ia && zb) || (ib && za))
      p = {sp, {EXP_W{1'b1}}, 1'b1, {(MAN_W-1){1'b0}}};
    else if (ia || ib)
      p = {sp, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
    else if (za || zb || e_unb <= 0)
      p = {sp, {(FW-1){1'b0}}};
    else if (e_unb >= (EXP_W+3)'(EMAX))
      p = {sp, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
    else
      p = {sp, e_unb[EXP_W-1:0], kept[MAN_W-1:0]};
  end
endmodule
