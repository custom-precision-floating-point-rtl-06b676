// baps_workload_run: drives one baps_dpd_top instance of a given BAPS
// configuration and number format with a multi-tone complex test signal
// (NTONE tones of random frequency and phase, an OFDM-like signal with high
// peak-to-average ratio), back-to-back input, and compares every output bit
// for bit with the reference model. It also checks the sample period: one
// accepted sample every (builder step cycles + 1) clock cycles.
// Results are reported on its ports.
module baps_workload_run
  import baps_pkg::*;
  import fp_ref_pkg::*;
  import baps_ref_pkg::*;
#(
  parameter baps_cfg_e CFG   = BAPS8_MEM1,
  parameter int        EXP_W = 8,
  parameter int        MAN_W = 23,
  parameter int        NS    = 100,
  parameter int        NTONE = 16
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int FW = EXP_W + MAN_W + 1;
  localparam int R  = num_basis(CFG);

  logic          x_valid = 1'b0, x_ready, coef_we = 1'b0, y_valid;
  logic [FW-1:0] x_re = '0, x_im = '0, coef_re = '0, coef_im = '0, y_re, y_im;
  logic [3:0]    coef_addr = '0;
  logic [63:0]   exp_re[$], exp_im[$];
  int            cyc = 0, got = 0, last_acc = -1;
  baps_model     model;

  baps_dpd_top #(.EXP_W(EXP_W), .MAN_W(MAN_W), .CFG(CFG)) dut (
    .clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x_ready(x_ready),
    .x_re(x_re), .x_im(x_im), .coef_we(coef_we), .coef_addr(coef_addr),
    .coef_re(coef_re), .coef_im(coef_im),
    .y_valid(y_valid), .y_re(y_re), .y_im(y_im));

  task automatic chk(string what, logic [63:0] got_v, logic [63:0] exp_v);
    checks++;
    if (got_v !== exp_v) begin
      failures++;
      if (failures < 4)
        $display("FAIL cfg %0d (%0d,%0d) %s: got %h expected %h",
                 CFG, EXP_W, MAN_W, what, got_v, exp_v);
    end
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && y_valid) begin
      if (exp_re.size() == 0) begin
        checks++; failures++;
      end else begin
        chk("y_re", 64'(y_re), exp_re.pop_front());
        chk("y_im", 64'(y_im), exp_im.pop_front());
      end
      got++;
      if (got == NS) done <= 1'b1;
    end
  end

  real f[NTONE], ph[NTONE];

  // multi-tone sample n: sum of NTONE unit phasors, scaled
  task automatic gen(int n, output real xr, output real xi);
    xr = 0.0; xi = 0.0;
    for (int k = 0; k < NTONE; k++) begin
      xr += 0.06 * $cos(2.0 * 3.14159265358979 * f[k] * n + ph[k]);
      xi += 0.06 * $sin(2.0 * 3.14159265358979 * f[k] * n + ph[k]);
    end
  endtask

  initial begin
    real xr, xi;
    int  sent = 0;
    done = 1'b0; checks = 0; failures = 0;
    model = new(int'(CFG), EXP_W, MAN_W);
    for (int k = 0; k < NTONE; k++) begin
      f[k]  = (real'($urandom % 2000) / 2000.0 - 0.5) * 0.25;   // |f| < 1/8 of fs
      ph[k] = real'($urandom % 6283) / 1000.0;
    end
    wait (rst_n);
    for (int r = 0; r < R; r++) begin
      @(negedge clk);
      coef_we   = 1'b1;
      coef_addr = 4'(r);
      coef_re   = (r == 0) ? FW'(to_fmt(1.05, EXP_W, MAN_W)) : FW'(rnd_val(-8, -3, EXP_W, MAN_W));
      coef_im   = (r == 0) ? FW'(to_fmt(0.02, EXP_W, MAN_W)) : FW'(rnd_val(-8, -3, EXP_W, MAN_W));
      model.theta[r].re = 64'(coef_re);
      model.theta[r].im = 64'(coef_im);
    end
    @(negedge clk);
    coef_we = 1'b0;
    gen(0, xr, xi);
    x_re    = FW'(to_fmt(xr, EXP_W, MAN_W));
    x_im    = FW'(to_fmt(xi, EXP_W, MAN_W));
    x_valid = 1'b1;
    // loop invariant: we are at a falling edge and x_* show the offered sample
    while (sent < NS) begin
      if (!x_ready) begin
        @(negedge clk);
      end else begin               // taken at the coming clock edge
        cpx_t x, y, phi[12];
        x.re = 64'(x_re); x.im = 64'(x_im);
        y = model.step(x, phi);
        exp_re.push_back(y.re);
        exp_im.push_back(y.im);
        if (last_acc >= 0) chk("sample period", 64'(cyc - last_acc), 64'(model.step_cycles() + 1));
        last_acc = cyc;
        sent++;
        // the next sample waits on the input until the builder is done
        gen(sent, xr, xi);
        @(negedge clk);
        x_re    = FW'(to_fmt(xr, EXP_W, MAN_W));
        x_im    = FW'(to_fmt(xi, EXP_W, MAN_W));
        x_valid = (sent < NS);
      end
    end
  end
endmodule
