// 2-way parallel histogram computation with an on-chip image memory.
//
// The image (NPIX = IMG_N * IMG_N pixels of BPP bits) sits in a dual-ported image memory.
// While idle it is loaded two pixels at a time: ld_we writes ld_pix_a at pixel address
// 2*ld_pair and ld_pix_b at 2*ld_pair + 1. start then computes its histogram:
//   1. clear the histogram memory (2**BPP cycles);
//   2. first step: a +2 counter reads one even and one odd pixel per cycle through the two
//      ports of the image memory; one cycle later each pixel value addresses its own
//      histogram array in the double-rate histogram memory and is counted (NPIX/2 cycles,
//      plus one cycle of image-memory read latency);
//   3. second step: the two arrays are added bin by bin (2**BPP cycles). The sums are left in
//      the first array and are also streamed out on res_valid / res_bin / res_count in bin
//      order.
// done pulses with the last result. ld_we is ignored while busy.
//
// Clocks: clk2x at twice clk, rising edges aligned; rst synchronous to clk.
// Cycles from the first pixel read to the last result: NPIX/2 + 2**BPP + 2.
//
// The structure (two memory blocks, even/odd address counters, per-port increment, merge by
// addition) is that of the paper. The load port, the clear pass and the result stream are
// this design's own.
module phc
  import phc_pkg::*;
#(
  parameter int unsigned BPP     = DEF_BPP,
  parameter int unsigned IMG_N   = DEF_IMG_N,
  parameter int unsigned COUNT_W = DEF_COUNT_W,
  localparam int unsigned NPIX = IMG_N * IMG_N,
  localparam int unsigned PAW  = (NPIX > 2) ? $clog2(NPIX) : 1,
  localparam int unsigned LAW  = (PAW > 1) ? PAW - 1 : 1
) (
  input  logic               clk,
  input  logic               clk2x,
  input  logic               rst,
  // image load, one pixel pair per cycle while idle
  input  logic               ld_we,
  input  logic [LAW-1:0]     ld_pair,
  input  logic [BPP-1:0]     ld_pix_a,
  input  logic [BPP-1:0]     ld_pix_b,
  // computation
  input  logic               start,
  output logic               busy,
  output logic               stage,
  output logic               done,
  output logic               res_valid,
  output logic [BPP-1:0]     res_bin,
  output logic [COUNT_W-1:0] res_count
);

  logic [PAW-1:0] pc_a, pc_b, addr1_a, addr1_b;
  logic           issue, last, hist_phase, wr;
  logic           pix_valid, pix_last;
  logic [BPP-1:0] dout1_a, dout1_b;

  assign wr      = ld_we && !busy;
  assign addr1_a = wr ? PAW'({ld_pair, 1'b0}) : pc_a;
  assign addr1_b = wr ? PAW'({ld_pair, 1'b1}) : pc_b;

  pixel_addr_gen #(.NPIX(NPIX)) u_pc (
    .clk, .rst, .start(start && !busy), .run(hist_phase),
    .addr_a(pc_a), .addr_b(pc_b), .issue, .last
  );

  image_mem #(.WIDTH(BPP), .DEPTH(NPIX)) u_img (
    .clk,
    .rw_a(wr), .addr_a(addr1_a), .din_a(ld_pix_a), .dout_a(dout1_a),
    .rw_b(wr), .addr_b(addr1_b), .din_b(ld_pix_b), .dout_b(dout1_b)
  );

  // The image memory answers one cycle after the address pair was issued.
  always_ff @(posedge clk) begin
    if (rst) begin
      pix_valid <= 1'b0;
      pix_last  <= 1'b0;
    end else begin
      pix_valid <= issue;
      pix_last  <= last;
    end
  end

  phc_engine #(.BPP(BPP), .COUNT_W(COUNT_W)) u_eng (
    .clk, .clk2x, .rst, .start,
    .pix_valid, .pix_a(dout1_a), .pix_b(dout1_b), .pix_last,
    .hist_phase, .stage, .busy, .done,
    .res_valid, .res_bin, .res_count
  );

endmodule
