// tb_type1_delay: self-checking test of the Type I delay line for delays of
// 1 and 4 samples. Values are shifted in on randomly spaced shift pulses and
// dout is compared with a queue model; after reset the output must be zero.
module tb_type1_delay;
  logic        clk = 1'b0, rst_n = 1'b0, shift = 1'b0;
  int          checks = 0, failures = 0;
  logic [31:0] din_re, din_im;
  logic [31:0] o1_re, o1_im, o4_re, o4_im;
  logic [63:0] q1[$], q4[$];

  always #5 clk = ~clk;

  type1_delay #(.FW(32), .DELAY(1)) d1 (.clk(clk), .rst_n(rst_n), .shift(shift),
    .din_re(din_re), .din_im(din_im), .dout_re(o1_re), .dout_im(o1_im));
  type1_delay #(.FW(32), .DELAY(4)) d4 (.clk(clk), .rst_n(rst_n), .shift(shift),
    .din_re(din_re), .din_im(din_im), .dout_re(o4_re), .dout_im(o4_im));

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din_re = '0; din_im = '0;
    q1 = {64'd0};
    q4 = {64'd0, 64'd0, 64'd0, 64'd0};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      chk("d1", {o1_re, o1_im}, q1[0]);
      chk("d4", {o4_re, o4_im}, q4[0]);
      shift  = ($urandom % 3) != 0;
      din_re = $urandom; din_im = $urandom;
      if (shift) begin
        q1.push_back({din_re, din_im}); void'(q1.pop_front());
        q4.push_back({din_re, din_im}); void'(q4.pop_front());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
