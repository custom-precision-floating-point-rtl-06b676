// type2_unit: Type II BAPS operation, y = phi_i * phi_j * conj(phi_k).
//
// One complex multiplier (fp_cmul) is used twice per operation:
//   step 1: p = phi_j * conj(phi_k)   (for j == k this is |phi_j|^2)
//   step 2: y = phi_i * p
// The caller may supply p from a cache of earlier results (p_hit = 1 with the
// value on p_in_*); step 1 is then skipped. This is how the builder reuses
// magnitude-squared terms that several basis functions share.
//
// Timing: start is taken in any cycle the unit is not busy. With p_hit the
// result appears with done one cycle after start, otherwise two cycles after
// start; a freshly computed p is shown on p_out_* with p_out_valid one cycle
// after start so the caller can cache it. The phi_* and p_in_* inputs must
// stay stable from start until done. Register resets are asynchronous,
// active low (a choice of this design).
module type2_unit #(
  parameter int EXP_W = 8,
  parameter int MAN_W = 23
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [EXP_W+MAN_W:0] i_re,
  input  logic [EXP_W+MAN_W:0] i_im,
  input  logic [EXP_W+MAN_W:0] j_re,
  input  logic [EXP_W+MAN_W:0] j_im,
  input  logic [EXP_W+MAN_W:0] k_re,
  input  logic [EXP_W+MAN_W:0] k_im,
  input  logic                 p_hit,
  input  logic [EXP_W+MAN_W:0] p_in_re,
  input  logic [EXP_W+MAN_W:0] p_in_im,
  output logic                 busy,
  output logic                 done,
  output logic [EXP_W+MAN_W:0] y_re,
  output logic [EXP_W+MAN_W:0] y_im,
  output logic                 p_out_valid,
  output logic [EXP_W+MAN_W:0] p_out_re,
  output logic [EXP_W+MAN_W:0] p_out_im
);
  localparam int FW = EXP_W + MAN_W + 1;

  typedef enum logic {T2_IDLE, T2_MUL2} t2_state_e;
  t2_state_e state;

  logic          second;     // multiplier does step 2 this cycle
  logic [FW-1:0] a_re, a_im, b_re, b_im, m_re, m_im;

  always_comb begin
    second = (state == T2_MUL2) || (start && p_hit);
    a_re   = second ? i_re : j_re;
    a_im   = second ? i_im : j_im;
    if (state == T2_MUL2) begin
      b_re = p_out_re;
      b_im = p_out_im;
    end else if (p_hit) begin
      b_re = p_in_re;
      b_im = p_in_im;
    end else begin
      b_re = k_re;
      b_im = k_im;
    end
  end

  fp_cmul #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_cmul (
    .a_re(a_re), .a_im(a_im), .b_re(b_re), .b_im(b_im),
    .conj_b(!second), .y_re(m_re), .y_im(m_im)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= T2_IDLE;
      done        <= 1'b0;
      p_out_valid <= 1'b0;
      y_re        <= '0;
      y_im        <= '0;
      p_out_re    <= '0;
      p_out_im    <= '0;
    end else begin
      done        <= 1'b0;
      p_out_valid <= 1'b0;
      if (state == T2_MUL2) begin
        y_re  <= m_re;
        y_im  <= m_im;
        done  <= 1'b1;
        state <= T2_IDLE;
      end else if (start && p_hit) begin
        y_re  <= m_re;
        y_im  <= m_im;
        done  <= 1'b1;
      end else if (start) begin
        p_out_re    <= m_re;
        p_out_im    <= m_im;
        p_out_valid <= 1'b1;
        state       <= T2_MUL2;
      end
    end
  end

  assign busy = (state == T2_MUL2);
endmodule
