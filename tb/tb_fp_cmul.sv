// tb_fp_cmul: self-checking test of the complex multiplier at (8,23) and
// (5,9), with and without conjugation of the second operand, against the
// complex reference of baps_ref_pkg (four rounded products, two rounded sums).
module tb_fp_cmul;
  import fp_ref_pkg::*;
  import baps_ref_pkg::*;

  logic        clk = 1'b0;
  int          checks = 0, failures = 0;
  logic [31:0] ar, ai, br, bi, yr, yi;
  logic [14:0] ar5, ai5, br5, bi5, yr5, yi5;
  logic        cj;

  always #5 clk = ~clk;

  fp_cmul #(.EXP_W(8), .MAN_W(23)) dut32 (.a_re(ar), .a_im(ai), .b_re(br), .b_im(bi),
                                          .conj_b(cj), .y_re(yr), .y_im(yi));
  fp_cmul #(.EXP_W(5), .MAN_W(9))  dut15 (.a_re(ar5), .a_im(ai5), .b_re(br5), .b_im(bi5),
                                          .conj_b(cj), .y_re(yr5), .y_im(yi5));

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cpx_t a, b, e;
    @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      cj = 1'($urandom);
      ar = 32'(rnd_val(-6, 3, 8, 23)); ai = 32'(rnd_val(-6, 3, 8, 23));
      br = 32'(rnd_val(-6, 3, 8, 23)); bi = 32'(rnd_val(-6, 3, 8, 23));
      ar5 = 15'(rnd_val(-4, 2, 5, 9)); ai5 = 15'(rnd_val(-4, 2, 5, 9));
      br5 = 15'(rnd_val(-4, 2, 5, 9)); bi5 = 15'(rnd_val(-4, 2, 5, 9));
      @(posedge clk);
      a.re = 64'(ar); a.im = 64'(ai); b.re = 64'(br); b.im = 64'(bi);
      e = cmul(a, b, cj, 8, 23);
      chk("re32", 64'(yr), e.re);
      chk("im32", 64'(yi), e.im);
      a.re = 64'(ar5); a.im = 64'(ai5); b.re = 64'(br5); b.im = 64'(bi5);
      e = cmul(a, b, cj, 5, 9);
      chk("re15", 64'(yr5), e.re);
      chk("im15", 64'(yi5), e.im);
    end
    // (1+2j)*(3+4j) = -5+10j ; with conj: (1+2j)*(3-4j) = 11+2j
    ar = 32'h3f800000; ai = 32'h40000000; br = 32'h40400000; bi = 32'h40800000;
    cj = 1'b0; @(posedge clk);
    chk("ex re", 64'(yr), 64'hc0a00000); chk("ex im", 64'(yi), 64'h41200000);
    cj = 1'b1; @(posedge clk);
    chk("cj re", 64'(yr), 64'h41300000); chk("cj im", 64'(yi), 64'h40000000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
