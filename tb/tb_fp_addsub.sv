// tb_fp_addsub: self-checking test of fp_addsub at (8,23) and (5,7). Random
// additions and subtractions, including operands of nearly equal magnitude
// (massive cancellation) and of very different magnitude (all of the smaller
// operand shifted into the sticky bit), are compared with the real-valued
// reference of fp_ref_pkg; signed zeros, infinities and NaN are checked
// against fixed bit patterns.
module tb_fp_addsub;
  import fp_ref_pkg::*;

  logic        clk = 1'b0;
  int          checks = 0, failures = 0, cycles = 0;
  logic [31:0] a32, b32, s32;
  logic [12:0] a13, b13, s13;
  logic        op;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  fp_addsub #(.EXP_W(8), .MAN_W(23)) dut32 (.a(a32), .b(b32), .op(op), .s(s32));
  fp_addsub #(.EXP_W(5), .MAN_W(7))  dut13 (.a(a13), .b(b13), .op(op), .s(s13));

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
    for (int n = 0; n < 4000; n++) begin
      op  = 1'($urandom);
      a32 = 32'(rnd_bits((n % 4 == 0) ? 126 : 30, 8, 23));
      b32 = 32'(rnd_bits((n % 4 == 0) ? 126 : 30, 8, 23));
      a13 = 13'(rnd_bits((n % 4 == 0) ? 14 : 4, 5, 7));
      b13 = 13'(rnd_bits((n % 4 == 0) ? 14 : 4, 5, 7));
      if (n % 5 == 1) begin
        // near cancellation: same exponent, few differing low bits
        b32 = {a32[31:8] ^ 24'($urandom % 2) << 23, 8'($urandom)};
        b13 = {a13[12:3], 3'($urandom)};
      end
      @(posedge clk);
      chk("add32", 64'(s32), op ? ref_sub(64'(a32), 64'(b32), 8, 23) : ref_add(64'(a32), 64'(b32), 8, 23));
      chk("add13", 64'(s13), op ? ref_sub(64'(a13), 64'(b13), 5, 7)  : ref_add(64'(a13), 64'(b13), 5, 7));
    end
    op = 1'b0;
    a32 = 32'h3f800000; b32 = 32'h3f800000; @(posedge clk);   // 1 + 1
    chk("1+1", 64'(s32), 64'h40000000);
    a32 = 32'h3f800000; b32 = 32'hbf800000; @(posedge clk);   // 1 + -1 = +0
    chk("1-1", 64'(s32), 64'h00000000);
    a32 = 32'h80000000; b32 = 32'h80000000; @(posedge clk);   // -0 + -0
    chk("-0+-0", 64'(s32), 64'h80000000);
    a32 = 32'h3f800000; b32 = 32'h33800000; @(posedge clk);   // 1 + 2^-24: tie, even -> 1
    chk("tie", 64'(s32), 64'h3f800000);
    a32 = 32'h3f800001; b32 = 32'h33800000; @(posedge clk);   // tie, odd -> up
    chk("tie-odd", 64'(s32), 64'h3f800002);
    a32 = 32'h7f7fffff; b32 = 32'h7f7fffff; @(posedge clk);   // overflow
    chk("ovf", 64'(s32), 64'h7f800000);
    op = 1'b1;
    a32 = 32'h7f800000; b32 = 32'h7f800000; @(posedge clk);   // inf - inf
    chk("inf-inf", 64'(s32), 64'h7fc00000);
    a32 = 32'h00800001; b32 = 32'h00800000; @(posedge clk);   // below normal -> 0
    chk("ufl", 64'(s32), 64'h00000000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
