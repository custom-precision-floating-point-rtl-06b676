// dpd_engine: DPD output stage, y = sum_{r=1..R} theta_r * phi_r.
//
// R complex multipliers (fp_cmul) form all products theta_r * phi_r in
// parallel; a balanced tree of complex adders (two fp_addsub each) sums them,
// R-1 complex adders in all: 7 for R = 8, 11 for R = 12. At a level with an
// odd number of terms the last term passes to the next level unchanged.
// The products and every tree level are registered, so the engine accepts a
// new basis-function set every cycle and its latency from in_valid to
// out_valid is 1 + ceil(log2 R) cycles (4 for R = 8, 5 for R = 12).
// The pipeline registers per level are this design's own choice.
//
// The coefficients theta_r live in a small register file that is written
// before operation through coef_we/coef_addr/coef_re/coef_im (one word per
// cycle) and reset to zero. Writing a coefficient while samples are in
// flight changes the result of samples whose products have not yet been
// registered. Reset is asynchronous, active low.
module dpd_engine #(
  parameter  int EXP_W = 8,
  parameter  int MAN_W = 23,
  parameter  int R     = 8,
  localparam int FW    = EXP_W + MAN_W + 1,
  localparam int AW    = (R > 1) ? $clog2(R) : 1,
  localparam int LV    = $clog2(R)            // adder-tree levels
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          coef_we,
  input  logic [AW-1:0] coef_addr,
  input  logic [FW-1:0] coef_re,
  input  logic [FW-1:0] coef_im,
  input  logic          in_valid,
  input  logic [FW-1:0] phi_re [R],
  input  logic [FW-1:0] phi_im [R],
  output logic          out_valid,
  output logic [FW-1:0] y_re,
  output logic [FW-1:0] y_im
);
  // number of terms at tree level l (level 0: the R products)
  function automatic int terms(int l);
    int n = R;
    for (int i = 0; i < l; i++) n = (n + 1) / 2;
    return n;
  endfunction

  logic [FW-1:0] theta_re [R];
  logic [FW-1:0] theta_im [R];
  logic [LV:0]   vld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < R; i++) begin
        theta_re[i] <= '0;
        theta_im[i] <= '0;
      end
    end else if (coef_we && (int'(coef_addr) < R)) begin
      theta_re[coef_addr] <= coef_re;
      theta_im[coef_addr] <= coef_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LV-1:0], in_valid};
  end

  for (genvar l = 0; l <= LV; l++) begin : g_lvl
    localparam int N = terms(l);
    logic [FW-1:0] re [N];
    logic [FW-1:0] im [N];
    logic [FW-1:0] nx_re [N];
    logic [FW-1:0] nx_im [N];

    if (l == 0) begin : g_mul
      for (genvar i = 0; i < N; i++) begin : g_i
        fp_cmul #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_mul (
          .a_re(theta_re[i]), .a_im(theta_im[i]),
          .b_re(phi_re[i]), .b_im(phi_im[i]), .conj_b(1'b0),
          .y_re(nx_re[i]), .y_im(nx_im[i])
        );
      end
    end else begin : g_add
      localparam int NP = terms(l - 1);
      for (genvar i = 0; i < N; i++) begin : g_i
        if (2 * i + 1 < NP) begin : g_sum
          fp_addsub #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_add_re (
            .a(g_lvl[l-1].re[2*i]), .b(g_lvl[l-1].re[2*i+1]), .op(1'b0), .s(nx_re[i]));
          fp_addsub #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_add_im (
            .a(g_lvl[l-1].im[2*i]), .b(g_lvl[l-1].im[2*i+1]), .op(1'b0), .s(nx_im[i]));
        end else begin : g_pass
          assign nx_re[i] = g_lvl[l-1].re[2*i];
          assign nx_im[i] = g_lvl[l-1].im[2*i];
        end
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < N; i++) begin
          re[i] <= '0;
          im[i] <= '0;
        end
      end else begin
        for (int i = 0; i < N; i++) begin
          re[i] <= nx_re[i];
          im[i] <= nx_im[i];
        end
      end
    end
  end

  assign y_re      = g_lvl[LV].re[0];
  assign y_im      = g_lvl[LV].im[0];
  assign out_valid = vld[LV];
endmodule
