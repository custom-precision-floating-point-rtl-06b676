// type1_delay: Type I BAPS operation, phi_r(n) = phi_i(n - DELAY).
//
// A shift register of DELAY complex words. The basis-function builder pulses
// shift once per sample, after all basis functions of that sample are known,
// with the current phi_i on din; dout then always shows the value pushed
// DELAY samples earlier, which is what the builder reads while computing the
// next sample. The register resets to zero, i.e. the signal is taken as zero
// before the first sample. Pure data movement: no rounding, so this operation
// is exact at any precision.
module type1_delay #(
  parameter int FW    = 32,   // word width of one real component
  parameter int DELAY = 1     // m of q^-m, at least 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          shift,
  input  logic [FW-1:0] din_re,
  input  logic [FW-1:0] din_im,
  output logic [FW-1:0] dout_re,
  output logic [FW-1:0] dout_im
);
  logic [FW-1:0] sr_re [DELAY];
  logic [FW-1:0] sr_im [DELAY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DELAY; i++) begin
        sr_re[i] <= '0;
        sr_im[i] <= '0;
      end
    end else if (shift) begin
      sr_re[0] <= din_re;
      sr_im[0] <= din_im;
      for (int i = 1; i < DELAY; i++) begin
        sr_re[i] <= sr_re[i-1];
        sr_im[i] <= sr_im[i-1];
      end
    end
  end

  assign dout_re = sr_re[DELAY-1];
  assign dout_im = sr_im[DELAY-1];
endmodule
