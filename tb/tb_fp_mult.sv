// tb_fp_mult: self-checking test of fp_mult at single precision (8,23) and at
// a reduced format (5,7). Random operands with exponents spread over the
// whole range (so overflow to infinity and flush to zero both occur) are
// compared with the real-valued reference of fp_ref_pkg, and zero, infinity
// and NaN cases are checked against the expected bit patterns.
module tb_fp_mult;
  import fp_ref_pkg::*;

  logic        clk = 1'b0;
  int          checks = 0, failures = 0, cycles = 0;
  logic [31:0] a32, b32, p32;
  logic [12:0] a13, b13, p13;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  fp_mult #(.EXP_W(8), .MAN_W(23)) dut32 (.a(a32), .b(b32), .p(p32));
  fp_mult #(.EXP_W(5), .MAN_W(7))  dut13 (.a(a13), .b(b13), .p(p13));

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
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      a32 = 32'(rnd_bits((n % 3 == 0) ? 120 : 40, 8, 23));
      b32 = 32'(rnd_bits((n % 3 == 0) ? 120 : 40, 8, 23));
      a13 = 13'(rnd_bits((n % 3 == 0) ? 14 : 6, 5, 7));
      b13 = 13'(rnd_bits((n % 3 == 0) ? 14 : 6, 5, 7));
      @(posedge clk);
      chk("mul32", 64'(p32), ref_mul(64'(a32), 64'(b32), 8, 23));
      chk("mul13", 64'(p13), ref_mul(64'(a13), 64'(b13), 5, 7));
    end
    // exact products and specials at single precision
    a32 = 32'h3fc00000; b32 = 32'h40000000; @(posedge clk);   // 1.5 * 2
    chk("1.5*2", 64'(p32), 64'h40400000);
    a32 = 32'h00000000; b32 = 32'hc0000000; @(posedge clk);   // 0 * -2
    chk("0*-2", 64'(p32), 64'h80000000);
    a32 = 32'h7f800000; b32 = 32'hc0000000; @(posedge clk);   // inf * -2
    chk("inf*-2", 64'(p32), 64'hff800000);
    a32 = 32'h7f800000; b32 = 32'h00000000; @(posedge clk);   // inf * 0
    chk("inf*0", 64'(p32), 64'h7fc00000);
    a32 = 32'h7f000000; b32 = 32'h7f000000; @(posedge clk);   // overflow
    chk("ovf", 64'(p32), 64'h7f800000);
    a32 = 32'h00800000; b32 = 32'h3f000000; @(posedge clk);   // min normal / 2
    chk("ufl", 64'(p32), 64'h00000000);
    a32 = 32'h3f800001; b32 = 32'h3f800001; @(posedge clk);   // (1+u)^2 = 1+2u+u^2 -> 1+2u
    chk("rnd", 64'(p32), 64'h3f800002);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
