// Testbench helper: runs one random image through a phc instance of the given size.
// Loads IMG_N x IMG_N random pixels, starts the computation, compares every result bin with
// a histogram counted here and measures the busy cycles. Reports its counts when fin rises.
module phc_mem_run #(
  parameter int BPP = 8,
  parameter int IMG_N = 16
) (
  input  logic clk,
  input  logic clk2x,
  input  logic rst,
  output logic fin,
  output int   checks,
  output int   failures,
  output int   busy_cycles
);
  localparam int NPIX = IMG_N * IMG_N, NB = 1 << BPP, CW = 32;
  localparam int LAW = $clog2(NPIX) - 1;
  logic ld_we, start, busy, stage, done, res_valid;
  logic [LAW-1:0] ld_pair;
  logic [BPP-1:0] ld_pix_a, ld_pix_b, res_bin;
  logic [CW-1:0] res_count;
  int expc [NB];

  phc #(.BPP(BPP), .IMG_N(IMG_N), .COUNT_W(CW)) dut (.*);

  always @(posedge clk) if (busy) busy_cycles++;

  initial begin
    int nres;
    fin = 0; checks = 0; failures = 0; busy_cycles = 0;
    ld_we = 0; start = 0; ld_pair = 0; ld_pix_a = 0; ld_pix_b = 0;
    foreach (expc[i]) expc[i] = 0;
    @(negedge rst);
    @(posedge clk); #1;
    for (int k = 0; k < NPIX / 2; k++) begin
      ld_we = 1; ld_pair = LAW'(k); ld_pix_a = BPP'($urandom); ld_pix_b = BPP'($urandom);
      expc[ld_pix_a]++; expc[ld_pix_b]++;
      @(posedge clk); #1;
    end
    ld_we = 0; start = 1;
    @(posedge clk); #1 start = 0;
    busy_cycles = 0; nres = 0;
    while (1) begin
      if (res_valid) begin
        checks++;
        if (res_bin != BPP'(nres) || res_count != CW'(expc[nres])) begin
          failures++;
          $display("FAIL %0d x %0d: bin %0d = %0d expected %0d", IMG_N, IMG_N, nres, res_count, expc[nres]);
        end
        nres++;
      end
      if (done) break;
      @(posedge clk); #1;
    end
    checks++;
    if (nres != NB) failures++;
    fin = 1;
  end
endmodule
