// Top level: the two configurations of the 2-way parallel histogram computation side by side.
//
//   u_mem    the memory-based design: image held in an on-chip dual-ported memory
//            (IMG_N x IMG_N pixels), histogram computed from it on start.
//   u_stream the stream-based design: pixel pairs arrive on a valid/ready stream (frames of
//            STREAM_N x STREAM_N pixels) and only the histogram memory is on chip.
// Each instance has its own ports, prefixed m_ and s_; they share clk, clk2x and rst.
// clk2x must run at twice clk with rising edges aligned to it (on an FPGA, from a clock
// manager, which is outside this design); rst is synchronous to clk.
//
// Defaults: 8 bits per pixel and 32-bit histogram elements; a 512 x 512 image memory, the
// largest image evaluated with on-chip storage; 1024 x 1024 stream frames, the largest frame
// evaluated with streaming.
module phc_top
  import phc_pkg::*;
#(
  parameter int unsigned BPP      = DEF_BPP,
  parameter int unsigned IMG_N    = DEF_IMG_N,
  parameter int unsigned STREAM_N = DEF_STREAM_N,
  parameter int unsigned COUNT_W  = DEF_COUNT_W,
  localparam int unsigned NPIX = IMG_N * IMG_N,
  localparam int unsigned PAW  = (NPIX > 2) ? $clog2(NPIX) : 1,
  localparam int unsigned LAW  = (PAW > 1) ? PAW - 1 : 1
) (
  input  logic               clk,
  input  logic               clk2x,
  input  logic               rst,
  // memory-based design
  input  logic               m_ld_we,
  input  logic [LAW-1:0]     m_ld_pair,
  input  logic [BPP-1:0]     m_ld_pix_a,
  input  logic [BPP-1:0]     m_ld_pix_b,
  input  logic               m_start,
  output logic               m_busy,
  output logic               m_stage,
  output logic               m_done,
  output logic               m_res_valid,
  output logic [BPP-1:0]     m_res_bin,
  output logic [COUNT_W-1:0] m_res_count,
  // stream-based design
  input  logic               s_start,
  input  logic               s_valid,
  output logic               s_ready,
  input  logic [BPP-1:0]     s_pix_a,
  input  logic [BPP-1:0]     s_pix_b,
  output logic               s_busy,
  output logic               s_stage,
  output logic               s_done,
  output logic               s_res_valid,
  output logic [BPP-1:0]     s_res_bin,
  output logic [COUNT_W-1:0] s_res_count
);

  phc #(.BPP(BPP), .IMG_N(IMG_N), .COUNT_W(COUNT_W)) u_mem (
    .clk, .clk2x, .rst,
    .ld_we(m_ld_we), .ld_pair(m_ld_pair), .ld_pix_a(m_ld_pix_a), .ld_pix_b(m_ld_pix_b),
    .start(m_start), .busy(m_busy), .stage(m_stage), .done(m_done),
    .res_valid(m_res_valid), .res_bin(m_res_bin), .res_count(m_res_count)
  );

  phc_stream #(.BPP(BPP), .IMG_N(STREAM_N), .COUNT_W(COUNT_W)) u_stream (
    .clk, .clk2x, .rst, .start(s_start),
    .s_valid, .s_ready, .s_pix_a, .s_pix_b,
    .busy(s_busy), .stage(s_stage), .done(s_done),
    .res_valid(s_res_valid), .res_bin(s_res_bin), .res_count(s_res_count)
  );

endmodule
