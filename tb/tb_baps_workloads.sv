// tb_baps_workloads: runs the four BAPS configurations (BAPS8/BAPS12, memory
// depth 1/5) each at four number formats (w,t) = (8,23) single precision,
// (8,9), (5,7) and (5,5), the ends and the critical points of the precision
// sweep the design is meant for. Every instance streams a multi-tone test
// signal back to back and checks each output bit for bit against the
// reference model, plus the sample period. The default configuration at
// single precision streams NS_LONG = 79,280 samples, the length of a full
// test-signal record; the other fifteen stream NS samples each.
module tb_baps_workloads;
  import baps_pkg::*;

  localparam int NS      = 120;
  localparam int NS_LONG = 79280;
  localparam int NF = 4;
  localparam int FMT_W [NF] = '{8, 8, 5, 5};
  localparam int FMT_T [NF] = '{23, 9, 7, 5};

  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] done;
  int   chk_v [16];
  int   fail_v [16];

  always #5 clk = ~clk;

  for (genvar c = 0; c < 4; c++) begin : g_cfg
    for (genvar p = 0; p < NF; p++) begin : g_fmt
      baps_workload_run #(.CFG(baps_cfg_e'(c)), .EXP_W(FMT_W[p]), .MAN_W(FMT_T[p]),
                          .NS((c == 0 && p == 0) ? NS_LONG : NS)) u_run (
        .clk(clk), .rst_n(rst_n), .done(done[c*NF+p]),
        .checks(chk_v[c*NF+p]), .failures(fail_v[c*NF+p]));
    end
  end

  task automatic report(int extra_fail);
    int checks = 0, failures = extra_fail;
    for (int i = 0; i < 16; i++) begin
      checks += chk_v[i];
      failures += fail_v[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (NS_LONG * 16 + 500) @(posedge clk);
    $display("watchdog expired");
    report(1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done == 16'hffff);
    repeat (10) @(posedge clk);
    for (int i = 0; i < 16; i++)
      $display("config %0d format (%0d,%0d): %0d checks, %0d failures",
               i / NF, FMT_W[i % NF], FMT_T[i % NF], chk_v[i], fail_v[i]);
    report(0);
    $finish;
  end
endmodule
