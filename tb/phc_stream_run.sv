// Testbench helper: streams one random frame, without gaps, through a phc_stream instance
// of the given size. Compares every result bin with a histogram counted here and measures
// the busy cycles. Reports its counts when fin rises.
module phc_stream_run #(
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
  localparam int NB = 1 << BPP, CW = 32;
  logic start, s_valid, s_ready, busy, stage, done, res_valid;
  logic [BPP-1:0] s_pix_a, s_pix_b, res_bin;
  logic [CW-1:0] res_count;
  int expc [NB];

  phc_stream #(.BPP(BPP), .IMG_N(IMG_N), .COUNT_W(CW)) dut (.*);

  always @(posedge clk) if (busy) busy_cycles++;

  initial begin
    int nres;
    fin = 0; checks = 0; failures = 0; busy_cycles = 0;
    start = 0; s_valid = 0; s_pix_a = 0; s_pix_b = 0;
    foreach (expc[i]) expc[i] = 0;
    @(negedge rst);
    @(posedge clk); #1 start = 1;
    @(posedge clk); #1 start = 0;
    busy_cycles = 0; nres = 0;
    while (1) begin
      s_valid = 1; s_pix_a = BPP'($urandom); s_pix_b = BPP'($urandom);
      #1;
      if (s_ready) begin
        expc[s_pix_a]++; expc[s_pix_b]++;
      end
      if (res_valid) begin
        checks++;
        if (res_bin != BPP'(nres) || res_count != CW'(expc[nres])) begin
          failures++;
          $display("FAIL bpp %0d %0d x %0d: bin %0d = %0d expected %0d", BPP, IMG_N, IMG_N, nres, res_count, expc[nres]);
        end
        nres++;
      end
      if (done) break;
      @(posedge clk); #1;
    end
    s_valid = 0;
    checks++;
    if (nres != NB) failures++;
    fin = 1;
  end
endmodule
