// tb_dpd_engine: self-checking test of the DPD computation engine for R = 8
// and R = 12 basis functions at single precision. Random coefficients are
// written through the coefficient port (plus one write to an address >= R,
// which must be ignored), then random basis-function sets are streamed in,
// mostly back to back. Each output is compared with the reference
// sum_r theta_r*phi_r formed as a pairwise tree, and the latency from
// in_valid to out_valid must be 1 + ceil(log2 R) cycles: 4 and 5.
module tb_dpd_engine;
  import fp_ref_pkg::*;
  import baps_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0, cyc = 0, finished = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  for (genvar g = 0; g < 2; g++) begin : g_r
    localparam int R  = (g == 0) ? 8 : 12;
    localparam int AW = $clog2(R);
    localparam int NS = 200;
    logic          coef_we = 1'b0, in_valid = 1'b0, out_valid;
    logic [AW-1:0] coef_addr = '0;
    logic [31:0]   coef_re = '0, coef_im = '0, y_re, y_im;
    logic [31:0]   phi_re [R];
    logic [31:0]   phi_im [R];
    logic [63:0]   exp_re[$], exp_im[$];
    int            in_cyc[$];
    int            got = 0;
    cpx_t          theta[12];

    dpd_engine #(.EXP_W(8), .MAN_W(23), .R(R)) dut (
      .clk(clk), .rst_n(rst_n), .coef_we(coef_we), .coef_addr(coef_addr),
      .coef_re(coef_re), .coef_im(coef_im), .in_valid(in_valid),
      .phi_re(phi_re), .phi_im(phi_im), .out_valid(out_valid), .y_re(y_re), .y_im(y_im));

    initial begin
      for (int r = 0; r < R; r++) begin phi_re[r] = '0; phi_im[r] = '0; end
      wait (rst_n);
      for (int r = 0; r < R; r++) begin
        @(negedge clk);
        coef_we   = 1'b1;
        coef_addr = AW'(r);
        coef_re   = 32'(rnd_val(-3, 2, 8, 23));
        coef_im   = 32'(rnd_val(-3, 2, 8, 23));
        theta[r].re = 64'(coef_re);
        theta[r].im = 64'(coef_im);
      end
      if (R < (1 << AW)) begin          // out-of-range address: ignored
        @(negedge clk);
        coef_addr = AW'(R);
        coef_re   = 32'h40000000;
      end
      @(negedge clk);
      coef_we = 1'b0;
      for (int n = 0; n < NS; n++) begin
        cpx_t prods[$], c, y;
        @(negedge clk);
        prods = {};
        in_valid = ($urandom % 8) != 0;
        if (!in_valid) begin n--; continue; end
        for (int r = 0; r < R; r++) begin
          phi_re[r] = 32'(rnd_val(-6, 1, 8, 23));
          phi_im[r] = 32'(rnd_val(-6, 1, 8, 23));
          c.re = 64'(phi_re[r]); c.im = 64'(phi_im[r]);
          prods.push_back(cmul(theta[r], c, 1'b0, 8, 23));
        end
        y = tree_sum(prods, 8, 23);
        exp_re.push_back(y.re);
        exp_im.push_back(y.im);
        in_cyc.push_back(cyc);
      end
      @(negedge clk);
      in_valid = 1'b0;
    end

    always @(posedge clk) begin
      if (rst_n && out_valid) begin
        if (exp_re.size() == 0) begin
          checks++; failures++;
          $display("FAIL R=%0d: unexpected out_valid", R);
        end else begin
          chk("y_re", 64'(y_re), exp_re.pop_front());
          chk("y_im", 64'(y_im), exp_im.pop_front());
          chk("latency", 64'(cyc - in_cyc.pop_front()), 64'(1 + $clog2(R)));
        end
        got++;
        if (got == NS) finished++;
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (finished == 2);
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
