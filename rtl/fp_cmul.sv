// fp_cmul: combinational complex floating-point multiplier,
//   (a_re + j a_im) * (b_re + j b_im')  with  b_im' = conj_b ? -b_im : b_im,
// built as the usual four real products and two real add/subtracts:
//   re = a_re*b_re - a_im*b_im',  im = a_re*b_im' + a_im*b_re.
// Conjugating the second operand is a sign-bit flip, so it is exact and costs
// no arithmetic. Every product and sum is rounded separately in the custom
// (EXP_W, MAN_W) format. No clock: result valid in the same cycle.
module fp_cmul #(
  parameter int EXP_W = 8,
  parameter int MAN_W = 23
) (
  input  logic [EXP_W+MAN_W:0] a_re,
  input  logic [EXP_W+MAN_W:0] a_im,
  input  logic [EXP_W+MAN_W:0] b_re,
  input  logic [EXP_W+MAN_W:0] b_im,
  input  logic                 conj_b,
  output logic [EXP_W+MAN_W:0] y_re,
  output logic [EXP_W+MAN_W:0] y_im
);
  localparam int FW = EXP_W + MAN_W + 1;

  logic [FW-1:0] bi, p_rr, p_ii, p_ri, p_ir;

  assign bi = {b_im[FW-1] ^ conj_b, b_im[FW-2:0]};

  fp_mult #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_rr (.a(a_re), .b(b_re), .p(p_rr));
  fp_mult #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_ii (.a(a_im), .b(bi),   .p(p_ii));
  fp_mult #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_ri (.a(a_re), .b(bi),   .p(p_ri));
  fp_mult #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_ir (.a(a_im), .b(b_re), .p(p_ir));

  fp_addsub #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_re (.a(p_rr), .b(p_ii), .op(1'b1), .s(y_re));
  fp_addsub #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_im (.a(p_ri), .b(p_ir), .op(1'b0), .s(y_im));
endmodule
