// Workload testbench: the stream-based 2-way design at 6, 8 and 12 bits per pixel on
// frames of 16 x 16 to 1024 x 1024, one random frame each without gaps, all 21
// configurations running concurrently. Checks every histogram and that the computation
// takes NPAIR + 1 + 2**BPP cycles (input register included; the clear pass of 2**BPP cycles
// comes on top). Prints the cycle ratio against one pixel per cycle; the published speed-ups
// also include the clock periods of both designs, which simulation cannot give.
module tb_fig7_workloads;
  localparam int NS = 7, NBPP = 3;
  localparam int SIZES [NS] = '{16, 32, 64, 128, 256, 512, 1024};
  localparam int BPPS [NBPP] = '{6, 8, 12};

  logic clk, clk2x, rst;
  logic fin [NBPP][NS];
  int ch [NBPP][NS], fl [NBPP][NS], bc [NBPP][NS];
  int checks = 0, failures = 0;

  initial begin
    clk = 0; clk2x = 0;
    forever begin
      #5 clk2x = 1; clk = ~clk;
      #5 clk2x = 0;
    end
  end

  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar b = 0; b < NBPP; b++) begin : g_bpp
    for (genvar g = 0; g < NS; g++) begin : g_size
      phc_stream_run #(.BPP(BPPS[b]), .IMG_N(SIZES[g])) u_run (
        .clk, .clk2x, .rst, .fin(fin[b][g]), .checks(ch[b][g]), .failures(fl[b][g]),
        .busy_cycles(bc[b][g]));
    end
  end

  initial begin
    int compute, nb, npix;
    rst = 1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int b = 0; b < NBPP; b++)
      for (int g = 0; g < NS; g++)
        wait (fin[b][g]);
    for (int b = 0; b < NBPP; b++) begin
      for (int g = 0; g < NS; g++) begin
        nb = 1 << BPPS[b];
        npix = SIZES[g] * SIZES[g];
        compute = bc[b][g] - nb;
        checks += ch[b][g] + 1;
        failures += fl[b][g];
        if (compute != npix / 2 + 1 + nb) begin
          failures++;
          $display("FAIL bpp %0d %0d x %0d: %0d compute cycles, expected %0d",
                   BPPS[b], SIZES[g], SIZES[g], compute, npix / 2 + 1 + nb);
        end
        $display("bpp %2d %4d x %4d: compute %7d cycles; one pixel per cycle %7d; ratio %0.2f",
                 BPPS[b], SIZES[g], SIZES[g], compute, npix, real'(npix) / real'(compute));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
