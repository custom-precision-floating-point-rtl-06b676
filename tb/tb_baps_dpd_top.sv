// tb_baps_dpd_top: end-to-end test of the predistorter with every parameter
// at its default (BAPS8-mem1, single precision). After reset the eight
// coefficients are loaded (theta_1 near 1, the others small, as a
// predistorter's coefficients typically are) and one write to an address
// beyond R checks that it is ignored. Then a random complex input stream is
// fed with random gaps, and every output is compared bit for bit with the
// reference model. The testbench also checks the latency from input
// handshake to y_valid and counts each mechanism of the design: input
// stalls, a sample accepted straight from the done state (back to back),
// overlap of the builder with a sample still in the engine, Type I delay
// steps, Type II steps with and without a cached |phi|^2, and the ignored
// coefficient write. A mechanism that never happened counts as a failure.
module tb_baps_dpd_top;
  import baps_pkg::*;
  import fp_ref_pkg::*;
  import baps_ref_pkg::*;

  localparam int NS = 400;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        x_valid = 1'b0, x_ready, coef_we = 1'b0, y_valid;
  logic [31:0] x_re = '0, x_im = '0, coef_re = '0, coef_im = '0, y_re, y_im;
  logic [3:0]  coef_addr = '0;
  int          checks = 0, failures = 0, cyc = 0, got = 0;
  int          n_stall = 0, n_b2b = 0, n_overlap = 0, n_delay = 0;
  int          n_hit = 0, n_miss = 0, n_ignored = 0;
  logic [63:0] exp_re[$], exp_im[$];
  int          acc_cyc[$];
  baps_model   model;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  baps_dpd_top dut (
    .clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x_ready(x_ready),
    .x_re(x_re), .x_im(x_im), .coef_we(coef_we), .coef_addr(coef_addr),
    .coef_re(coef_re), .coef_im(coef_im),
    .y_valid(y_valid), .y_re(y_re), .y_im(y_im));

  task automatic chk(string what, logic [63:0] got_v, logic [63:0] exp_v);
    checks++;
    if (got_v !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got_v, exp_v);
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  // mechanism counters, observed inside the design
  always @(negedge clk) if (rst_n) begin
    if (dut.u_builder.state == 2'd1  /* B_STEP */) begin
      if (dut.u_builder.cur.kind == OP_DELAY) n_delay++;
      if (dut.u_builder.t2_start && dut.u_builder.t2_hit) n_hit++;
      if (dut.u_builder.t2_start && !dut.u_builder.t2_hit) n_miss++;
    end
    if (x_valid && x_ready && dut.u_builder.state == 2'd3  /* B_DONE */) n_b2b++;
    // builder busy on sample n+1 while sample n is still in the engine
    if ((dut.u_builder.state == 2'd1 || dut.u_builder.state == 2'd2) && dut.u_engine.vld != '0)
      n_overlap++;
  end

  always @(posedge clk) begin
    if (rst_n && y_valid) begin
      if (exp_re.size() == 0) begin
        checks++; failures++;
        $display("FAIL unexpected y_valid");
      end else begin
        chk("y_re", 64'(y_re), exp_re.pop_front());
        chk("y_im", 64'(y_im), exp_im.pop_front());
        chk("latency", 64'(cyc - acc_cyc.pop_front()),
            64'(model.step_cycles() + 1 + 1 + $clog2(model.R)));
      end
      got++;
    end
  end

  initial begin
    repeat (40 * NS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sent = 0;
    model = new(0, 8, 23);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // coefficient load
    for (int r = 0; r < 8; r++) begin
      @(negedge clk);
      coef_we   = 1'b1;
      coef_addr = 4'(r);
      coef_re   = (r == 0) ? 32'(to_fmt(1.02, 8, 23)) : 32'(rnd_val(-7, -3, 8, 23));
      coef_im   = (r == 0) ? 32'(to_fmt(-0.03, 8, 23)) : 32'(rnd_val(-7, -3, 8, 23));
      model.theta[r].re = 64'(coef_re);
      model.theta[r].im = 64'(coef_im);
    end
    @(negedge clk);
    coef_addr = 4'd9;                   // beyond R: must be ignored
    coef_re   = 32'h40000000;
    n_ignored++;
    @(negedge clk);
    coef_we = 1'b0;
    // sample stream
    while (sent < NS) begin
      @(negedge clk);
      if (!x_valid && (sent < NS / 2 || ($urandom % 3 != 0))) begin
        x_valid = 1'b1;
        x_re = 32'(rnd_val(-5, 0, 8, 23));
        x_im = 32'(rnd_val(-5, 0, 8, 23));
      end
      if (x_valid && !x_ready) n_stall++;
      if (x_valid && x_ready) begin
        cpx_t x, y, phi[12];
        x.re = 64'(x_re); x.im = 64'(x_im);
        y = model.step(x, phi);
        exp_re.push_back(y.re);
        exp_im.push_back(y.im);
        acc_cyc.push_back(cyc);
        sent++;
        @(negedge clk);
        x_valid = 1'b0;
      end
    end
    wait (got == NS);
    repeat (10) @(posedge clk);
    chk("outputs", 64'(got), 64'(NS));
    $display("mechanisms:");
    need("input stalls", n_stall);
    need("back-to-back accepts", n_b2b);
    need("builder/engine overlap cycles", n_overlap);
    need("Type I delay steps", n_delay);
    need("Type II |phi|^2 cache hits", n_hit);
    need("Type II |phi|^2 computed", n_miss);
    need("ignored coefficient writes", n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
