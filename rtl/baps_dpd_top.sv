// baps_dpd_top: BAPS digital predistorter in custom-precision floating point.
//
// For every complex input sample x(n) the predistorted sample
//   y(n) = sum_r theta_r * phi_r(n)
// is produced, where the basis functions phi_r follow the BAPS operation
// sequence of configuration CFG (baps_pkg). Two stages run overlapped:
//   basis_builder  sequential FSM, computes phi_1..phi_R of one sample;
//   dpd_engine     parallel multipliers and adder tree, pipelined.
// When the builder finishes sample n it hands the whole phi set to the engine
// in one cycle (phi_valid) and can take x(n+1) in that same cycle, so the
// builder works on x(n+1) while the engine is still summing sample n. The
// engine never stalls, so throughput is set by the builder alone: one sample
// per builder sequence (15 cycles for BAPS8-mem1 with back-to-back input;
// 19 cycles from an input handshake to its y_valid).
//
// Number format: {sign, EXP_W exponent bits, MAN_W fraction bits}, IEEE-754
// layout, defaults (8,23) = single precision. Every arithmetic unit rounds to
// nearest, ties to even.
//
// Interface:
//   x_valid/x_ready   input handshake; a sample moves when both are high.
//   y_valid           one-cycle pulse with y_re/y_im, no back-pressure: the
//                     consumer must take every output.
//   coef_we/addr/re/im  writes theta_{addr+1}; load all R coefficients after
//                     reset, before the first sample. Addresses >= R are
//                     ignored.
// Latency from the accepting x handshake to y_valid: builder cycles
// (sum of step cycles + 1) plus 1 + ceil(log2 R) engine cycles.
// Reset: asynchronous, active low; delay lines and coefficients clear to 0.
module baps_dpd_top
  import baps_pkg::*;
#(
  parameter int        EXP_W = 8,
  parameter int        MAN_W = 23,
  parameter baps_cfg_e CFG   = BAPS8_MEM1,
  localparam int       R     = num_basis(CFG),
  localparam int       FW    = EXP_W + MAN_W + 1,
  localparam int       AW    = $clog2(R)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             x_valid,
  output logic             x_ready,
  input  logic [FW-1:0]    x_re,
  input  logic [FW-1:0]    x_im,
  input  logic             coef_we,
  input  logic [IDX_W-1:0] coef_addr,
  input  logic [FW-1:0]    coef_re,
  input  logic [FW-1:0]    coef_im,
  output logic             y_valid,
  output logic [FW-1:0]    y_re,
  output logic [FW-1:0]    y_im
);
  logic          phi_valid;
  logic [FW-1:0] phi_re [R];
  logic [FW-1:0] phi_im [R];
  logic          coef_ok;

  assign coef_ok = coef_we && (int'(coef_addr) < R);

  basis_builder #(.EXP_W(EXP_W), .MAN_W(MAN_W), .CFG(CFG)) u_builder (
    .clk(clk), .rst_n(rst_n),
    .x_valid(x_valid), .x_ready(x_ready), .x_re(x_re), .x_im(x_im),
    .phi_valid(phi_valid), .phi_re(phi_re), .phi_im(phi_im)
  );

  dpd_engine #(.EXP_W(EXP_W), .MAN_W(MAN_W), .R(R)) u_engine (
    .clk(clk), .rst_n(rst_n),
    .coef_we(coef_ok), .coef_addr(coef_addr[AW-1:0]),
    .coef_re(coef_re), .coef_im(coef_im),
    .in_valid(phi_valid), .phi_re(phi_re), .phi_im(phi_im),
    .out_valid(y_valid), .y_re(y_re), .y_im(y_im)
  );
endmodule
