// basis_builder: computes the R basis functions phi_1..phi_R of one input
// sample, one after the other, following the operation sequence of the BAPS
// configuration CFG (see baps_pkg).
//
// A finite-state machine walks r = 0..R-1. Each step executes the operation
// that defines phi_r:
//   input       phi_r = x(n)                       1 cycle
//   Type I      phi_r = phi_a(n-m), read from a    1 cycle
//               type1_delay shift register
//   Type II     phi_r = phi_a * phi_b * conj(phi_c) 2 cycles if |phi_b|^2 is
//               on the shared type2_unit            cached, 3 if not
// Magnitude-squared terms (b == c) are cached per source index for the
// duration of one sample, so e.g. |phi_1|^2, which several basis functions of
// every table use, is computed once per sample. After the last step the FSM
// spends one cycle in its done state: phi_valid is high, the complete set
// phi_re/phi_im is on the outputs for the next stage to capture, and every
// delay line shifts in the current value of its source. x_ready is high in
// the idle and done states, so a waiting sample starts right after done
// without passing through idle.
//
// Interface: x_valid/x_ready handshake on the input sample (x_re, x_im);
// phi_valid is a one-cycle pulse. From the accepting handshake to phi_valid
// takes (sum of step cycles) + 1 cycles, which is also the sample period for
// back-to-back input: 14 + 1 = 15 cycles for BAPS8-mem1.
// The FSM, the delay shift registers and the |phi|^2 caching follow the
// published BAPS hardware; the cycle-level schedule, the handshake and the
// reset values are this design's own. Reset is asynchronous, active low;
// delay lines and caches start at zero.
module basis_builder
  import baps_pkg::*;
#(
  parameter int        EXP_W = 8,
  parameter int        MAN_W = 23,
  parameter baps_cfg_e CFG   = BAPS8_MEM1,
  localparam int       R     = num_basis(CFG),
  localparam int       FW    = EXP_W + MAN_W + 1,
  localparam int       RW    = $clog2(R)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          x_valid,
  output logic          x_ready,
  input  logic [FW-1:0] x_re,
  input  logic [FW-1:0] x_im,
  output logic          phi_valid,
  output logic [FW-1:0] phi_re [R],
  output logic [FW-1:0] phi_im [R]
);
  typedef enum logic [1:0] {B_IDLE, B_STEP, B_WAIT, B_DONE} b_state_e;
  b_state_e state;

  logic [IDX_W-1:0] r;
  baps_op_t         cur;
  logic [FW-1:0]    x_hold_re, x_hold_im;
  logic [FW-1:0]    dly_re [R];
  logic [FW-1:0]    dly_im [R];
  logic [FW-1:0]    cache_re [R];
  logic [FW-1:0]    cache_im [R];
  logic [R-1:0]     cache_v;
  logic             shift, last, accept;
  logic [RW-1:0]    ri, ia, ib, ic;   // indices narrowed to the array size

  logic          t2_start, t2_hit, t2_busy, t2_done, t2_pv;
  logic [FW-1:0] t2_y_re, t2_y_im, t2_p_re, t2_p_im;

  always_comb begin
    cur      = get_op(CFG, int'(r));
    ri       = r[RW-1:0];
    ia       = cur.a[RW-1:0];
    ib       = cur.b[RW-1:0];
    ic       = cur.c[RW-1:0];
    last     = (int'(r) == R - 1);
    x_ready  = (state == B_IDLE) || (state == B_DONE);
    accept   = x_ready && x_valid;
    shift    = (state == B_DONE);
    t2_hit   = (cur.b == cur.c) && cache_v[ib];
    t2_start = (state == B_STEP) && (cur.kind == OP_NONLIN);
  end

  assign phi_valid = (state == B_DONE);

  // Type I delay lines, one per delay operation of the configuration
  for (genvar g = 0; g < R; g++) begin : g_dly
    localparam baps_op_t OPG = get_op(CFG, g);
    if (OPG.kind == OP_DELAY) begin : g_on
      type1_delay #(.FW(FW), .DELAY(int'(OPG.m))) u_dly (
        .clk(clk), .rst_n(rst_n), .shift(shift),
        .din_re(phi_re[RW'(OPG.a)]), .din_im(phi_im[RW'(OPG.a)]),
        .dout_re(dly_re[g]), .dout_im(dly_im[g])
      );
    end else begin : g_off
      assign dly_re[g] = '0;
      assign dly_im[g] = '0;
    end
  end

  type2_unit #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_t2 (
    .clk(clk), .rst_n(rst_n), .start(t2_start),
    .i_re(phi_re[ia]), .i_im(phi_im[ia]),
    .j_re(phi_re[ib]), .j_im(phi_im[ib]),
    .k_re(phi_re[ic]), .k_im(phi_im[ic]),
    .p_hit(t2_hit), .p_in_re(cache_re[ib]), .p_in_im(cache_im[ib]),
    .busy(t2_busy), .done(t2_done), .y_re(t2_y_re), .y_im(t2_y_im),
    .p_out_valid(t2_pv), .p_out_re(t2_p_re), .p_out_im(t2_p_im)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= B_IDLE;
      r         <= '0;
      x_hold_re <= '0;
      x_hold_im <= '0;
      cache_v   <= '0;
      for (int i = 0; i < R; i++) begin
        phi_re[i]   <= '0;
        phi_im[i]   <= '0;
        cache_re[i] <= '0;
        cache_im[i] <= '0;
      end
    end else begin
      case (state)
        B_IDLE, B_DONE: begin
          if (accept) begin
            x_hold_re <= x_re;
            x_hold_im <= x_im;
            cache_v   <= '0;
            r         <= '0;
            state     <= B_STEP;
          end else begin
            state <= B_IDLE;
          end
        end
        B_STEP: begin
          case (cur.kind)
            OP_INPUT: begin
              phi_re[ri] <= x_hold_re;
              phi_im[ri] <= x_hold_im;
            end
            OP_DELAY: begin
              phi_re[ri] <= dly_re[ri];
              phi_im[ri] <= dly_im[ri];
            end
            default: ;
          endcase
          if (cur.kind == OP_NONLIN) begin
            state <= B_WAIT;
          end else if (last) begin
            state <= B_DONE;
          end else begin
            r <= r + 1'b1;
          end
        end
        B_WAIT: begin
          if (t2_pv && (cur.b == cur.c)) begin
            cache_re[ib] <= t2_p_re;
            cache_im[ib] <= t2_p_im;
            cache_v[ib]  <= 1'b1;
          end
          if (t2_done) begin
            phi_re[ri] <= t2_y_re;
            phi_im[ri] <= t2_y_im;
            if (last) begin
              state <= B_DONE;
            end else begin
              r     <= r + 1'b1;
              state <= B_STEP;
            end
          end
        end
        default: state <= B_IDLE;
      endcase
    end
  end

  // The type2_unit is started only from B_STEP and the FSM waits for its done.
  assert property (@(posedge clk) disable iff (!rst_n) t2_start |-> !t2_busy);
endmodule
