// tb_basis_builder: self-checking test of the basis-function builder in all
// four BAPS configurations at once (single precision). Each instance gets
// its own random complex input stream with random gaps in x_valid, including
// samples offered while the builder is busy. Every phi set delivered with
// phi_valid is compared with the reference model (which includes the delay
// history across samples), and the cycles from the input handshake to
// phi_valid are checked against the step count derived from the table:
// 1 cycle per input or delay step, 2 per Type II step whose |phi|^2 is cached,
// 3 per Type II step that computes it, plus the done cycle.
module tb_basis_builder;
  import baps_pkg::*;
  import fp_ref_pkg::*;
  import baps_ref_pkg::*;

  localparam int NS = 60;   // samples per configuration

  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0, cyc = 0;
  int   finished = 0, stalls = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  for (genvar g = 0; g < 4; g++) begin : g_cfg
    localparam baps_cfg_e CFG = baps_cfg_e'(g);
    localparam int R = num_basis(CFG);
    logic        x_valid = 1'b0, x_ready, phi_valid;
    logic [31:0] x_re = '0, x_im = '0;
    logic [31:0] phi_re [R];
    logic [31:0] phi_im [R];
    logic [12*64-1:0] expq_re[$], expq_im[$];   // phi sets, packed
    int          acc_cyc[$];
    int          got = 0;

    basis_builder #(.EXP_W(8), .MAN_W(23), .CFG(CFG)) dut (
      .clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x_ready(x_ready),
      .x_re(x_re), .x_im(x_im), .phi_valid(phi_valid), .phi_re(phi_re), .phi_im(phi_im));

    baps_model model;

    initial begin
      int sent = 0;
      model = new(g, 8, 23);
      wait (rst_n);
      while (sent < NS) begin
        @(negedge clk);
        if (!x_valid && ($urandom % 4 != 0)) begin
          x_valid = 1'b1;
          x_re = 32'(rnd_val(-4, 0, 8, 23));
          x_im = 32'(rnd_val(-4, 0, 8, 23));
        end
        // inputs and x_ready are stable here: decide what the next edge does
        if (x_valid && !x_ready) stalls++;
        if (x_valid && x_ready) begin
          cpx_t x, y, phi[12];
          x.re = 64'(x_re); x.im = 64'(x_im);
          y = model.step(x, phi);
          begin
            logic [12*64-1:0] pr, pi;
            for (int r = 0; r < 12; r++) begin
              pr[r*64 +: 64] = phi[r].re;
              pi[r*64 +: 64] = phi[r].im;
            end
            expq_re.push_back(pr);
            expq_im.push_back(pi);
          end
          acc_cyc.push_back(cyc);
          sent++;
          @(negedge clk);
          x_valid = 1'b0;
        end
      end
    end

    always @(posedge clk) begin
      if (rst_n && phi_valid) begin
        logic [12*64-1:0] er, ei;
        int   c0;
        if (expq_re.size() == 0) begin
          checks++; failures++;
          $display("FAIL cfg %0d: unexpected phi_valid", g);
        end else begin
          er = expq_re.pop_front();
          ei = expq_im.pop_front();
          c0 = acc_cyc.pop_front();
          chk("latency", 64'(cyc - c0), 64'(model.step_cycles() + 1));
          for (int r = 0; r < R; r++) begin
            chk($sformatf("cfg%0d phi%0d re", g, r+1), 64'(phi_re[r]), er[r*64 +: 64]);
            chk($sformatf("cfg%0d phi%0d im", g, r+1), 64'(phi_im[r]), ei[r*64 +: 64]);
          end
        end
        got++;
        if (got == NS) finished++;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (finished == 4);
    repeat (2) @(posedge clk);
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("FAIL no input stall was exercised");
    end
    $display("input stalls seen: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
