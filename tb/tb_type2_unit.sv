// tb_type2_unit: self-checking test of the Type II unit at (8,23). Random
// operations phi_i * phi_j * conj(phi_k) (general j != k and the magnitude
// form j == k) are issued with and without a cached p. Checks: the result
// against the reference, the freshly computed p, and the latency (done one
// cycle after start on a cache hit, two cycles on a miss).
module tb_type2_unit;
  import fp_ref_pkg::*;
  import baps_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0, hit = 1'b0;
  int          checks = 0, failures = 0;
  logic [31:0] ir, ii, jr, ji, kr, ki, pr, pi;
  logic        busy, done, pv;
  logic [31:0] yr, yi, por, poi;

  always #5 clk = ~clk;

  type2_unit #(.EXP_W(8), .MAN_W(23)) dut (
    .clk(clk), .rst_n(rst_n), .start(start),
    .i_re(ir), .i_im(ii), .j_re(jr), .j_im(ji), .k_re(kr), .k_im(ki),
    .p_hit(hit), .p_in_re(pr), .p_in_im(pi),
    .busy(busy), .done(done), .y_re(yr), .y_im(yi),
    .p_out_valid(pv), .p_out_re(por), .p_out_im(poi));

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cpx_t ci, cj, ck, p, e;
    int   lat;
    ir = '0; ii = '0; jr = '0; ji = '0; kr = '0; ki = '0; pr = '0; pi = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      ir = 32'(rnd_val(-5, 1, 8, 23)); ii = 32'(rnd_val(-5, 1, 8, 23));
      jr = 32'(rnd_val(-5, 1, 8, 23)); ji = 32'(rnd_val(-5, 1, 8, 23));
      if (n % 2 == 0) begin kr = jr; ki = ji; end
      else begin kr = 32'(rnd_val(-5, 1, 8, 23)); ki = 32'(rnd_val(-5, 1, 8, 23)); end
      ci.re = 64'(ir); ci.im = 64'(ii); cj.re = 64'(jr); cj.im = 64'(ji);
      ck.re = 64'(kr); ck.im = 64'(ki);
      p   = cmul(cj, ck, 1'b1, 8, 23);
      e   = cmul(ci, p, 1'b0, 8, 23);
      hit = (n % 3 == 0);
      pr  = 32'(p.re); pi = 32'(p.im);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat = 1;
      if (!hit) begin
        chk("p_valid", 64'(pv), 64'd1);
        chk("p_re", 64'(por), p.re);
        chk("p_im", 64'(poi), p.im);
      end
      while (!done && lat < 10) begin @(negedge clk); lat++; end
      chk("latency", 64'(lat), hit ? 64'd1 : 64'd2);
      chk("y_re", 64'(yr), e.re);
      chk("y_im", 64'(yi), e.im);
      if (n % 2 == 0) chk("mag im", p.im, 64'd0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
