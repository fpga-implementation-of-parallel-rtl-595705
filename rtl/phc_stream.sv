// 2-way parallel histogram computation on a stream of pixels.
//
// Instead of an image memory, the pixels arrive as a stream of pairs: s_pix_a is the pixel at
// an even and s_pix_b the pixel at the following odd position of the image. A pair is taken
// on a cycle with s_valid && s_ready; s_ready is high during the first step only. The pairs
// are registered and counted; the NPIX/2-th pair (NPIX = IMG_N * IMG_N) ends the first step,
// after which the engine merges its two histograms and streams the result out exactly as in
// the memory-based version. start (while idle) begins a frame; the first 2**BPP cycles after
// it clear the histogram memory, with s_ready low.
//
// Clocks: clk2x at twice clk, rising edges aligned; rst synchronous to clk.
// Cycles per frame: 2**BPP (clear) + one per accepted pair + 1 + 2**BPP (merge).
//
// Feeding the 2-way engine from a pixel stream, so that only the histogram memory is needed,
// is the paper's remedy for images too large for on-chip memory. The valid/ready handshake,
// the input register and the pair counter are this design's own.
module phc_stream
  import phc_pkg::*;
#(
  parameter int unsigned BPP     = DEF_BPP,
  parameter int unsigned IMG_N   = DEF_STREAM_N,
  parameter int unsigned COUNT_W = DEF_COUNT_W,
  localparam int unsigned NPAIR = IMG_N * IMG_N / 2,
  localparam int unsigned CW    = (NPAIR > 1) ? $clog2(NPAIR) : 1
) (
  input  logic               clk,
  input  logic               clk2x,
  input  logic               rst,
  input  logic               start,
  input  logic               s_valid,
  output logic               s_ready,
  input  logic [BPP-1:0]     s_pix_a,
  input  logic [BPP-1:0]     s_pix_b,
  output logic               busy,
  output logic               stage,
  output logic               done,
  output logic               res_valid,
  output logic [BPP-1:0]     res_bin,
  output logic [COUNT_W-1:0] res_count
);

  logic           hist_phase, take, last_in;
  logic [CW-1:0]  pairs;
  logic           pix_valid, pix_last, sent_last;
  logic [BPP-1:0] pix_a, pix_b;

  // Stop accepting once the last pair is in the input register.
  assign s_ready = hist_phase && !sent_last;
  assign take    = s_valid && s_ready;
  assign last_in = (pairs == CW'(NPAIR - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      pairs     <= '0;
      sent_last <= 1'b0;
      pix_valid <= 1'b0;
      pix_last  <= 1'b0;
      pix_a     <= '0;
      pix_b     <= '0;
    end else begin
      if (start && !busy) begin
        pairs     <= '0;
        sent_last <= 1'b0;
      end else if (take) begin
        pairs <= pairs + 1'b1;
        if (last_in) sent_last <= 1'b1;
      end
      pix_valid <= take;
      pix_last  <= take && last_in;
      if (take) begin
        pix_a <= s_pix_a;
        pix_b <= s_pix_b;
      end
    end
  end

  phc_engine #(.BPP(BPP), .COUNT_W(COUNT_W)) u_eng (
    .clk, .clk2x, .rst, .start,
    .pix_valid, .pix_a, .pix_b, .pix_last,
    .hist_phase, .stage, .busy, .done,
    .res_valid, .res_bin, .res_count
  );

  initial begin
    assert (NPAIR >= 1 && (IMG_N * IMG_N) % 2 == 0)
      else $fatal(1, "phc_stream: IMG_N * IMG_N must be even");
  end

endmodule
