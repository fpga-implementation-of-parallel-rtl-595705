// Workload testbench: the memory-based 2-way design on the evaluated image sizes, 16 x 16 to
// 512 x 512 at 8 bits per pixel, one random image each, all sizes running concurrently.
// Checks every histogram and that the computation (first step + merge) takes the published
// cycle count NPIX/2 + 2**BPP plus this design's one read-latency cycle; the clear pass
// (2**BPP cycles) comes on top. Prints the cycle ratio against one pixel per cycle.
module tb_fig6_workloads;
  localparam int NS = 6;
  localparam int SIZES [NS] = '{16, 32, 64, 128, 256, 512};
  // published cycle counts of the 2-way design
  localparam int PUB [NS] = '{384, 768, 2304, 8448, 33024, 131328};
  localparam int BPP = 8, NB = 1 << BPP;

  logic clk, clk2x, rst;
  logic fin [NS];
  int ch [NS], fl [NS], bc [NS];
  int checks = 0, failures = 0;

  initial begin
    clk = 0; clk2x = 0;
    forever begin
      #5 clk2x = 1; clk = ~clk;
      #5 clk2x = 0;
    end
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NS; g++) begin : g_size
    phc_mem_run #(.BPP(BPP), .IMG_N(SIZES[g])) u_run (
      .clk, .clk2x, .rst, .fin(fin[g]), .checks(ch[g]), .failures(fl[g]), .busy_cycles(bc[g]));
  end

  initial begin
    int compute;
    rst = 1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int g = 0; g < NS; g++) begin
      wait (fin[g]);
    end
    for (int g = 0; g < NS; g++) begin
      compute = bc[g] - NB;
      checks += ch[g] + 1;
      failures += fl[g];
      if (compute != PUB[g] + 1) begin
        failures++;
        $display("FAIL %0d x %0d: %0d compute cycles, expected %0d", SIZES[g], SIZES[g], compute, PUB[g] + 1);
      end
      $display("%0d x %0d: compute %0d cycles (published %0d), with clear %0d; one pixel per cycle would take %0d; ratio %0.2f",
               SIZES[g], SIZES[g], compute, PUB[g], bc[g], SIZES[g] * SIZES[g],
               real'(SIZES[g] * SIZES[g]) / real'(compute));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
