// Address and write-data selection for the two ports of the histogram memory.
//
// Combinational. For the operation of the current system cycle it forms both ports'
// addresses, write data and enables:
//   HOP_INCR  (first step)  addr2A = pix_a,  addr2B = pix_b + 2**BPP,
//                           din2A = dout2A + 1, din2B = dout2B + 1, both ports write.
//   HOP_MERGE (second step) addr2A = idx,    addr2B = idx + 2**BPP,
//                           din2A = dout2A + dout2B, only port A writes.
//   HOP_CLEAR               addr2A = idx,    addr2B = idx + 2**BPP, both ports write 0.
//   HOP_NONE                both ports disabled.
// dout2A/dout2B are the values the memory read in the middle of the cycle, so din is ready
// for the write at the end of it. The top bit of addr_a is always 0: port A only ever
// addresses the first array, but its address keeps the memory's full width.
//
// The +1 incrementers, the +2**BPP offset adders and the adder of the two arrays, selected by
// the stage of the computation, are the paper's. The clear operation, and leaving port B idle
// during the merge instead of rewriting dout2B + 1, are this design's choices.
module hist_datapath
  import phc_pkg::*;
#(
  parameter int unsigned BPP     = 8,
  parameter int unsigned COUNT_W = 32,
  localparam int unsigned AW = BPP + 1
) (
  input  hist_op_e           op,
  input  logic [BPP-1:0]     pix_a,
  input  logic [BPP-1:0]     pix_b,
  input  logic [BPP-1:0]     idx,
  input  logic [COUNT_W-1:0] dout_a,
  input  logic [COUNT_W-1:0] dout_b,
  output logic               en_a,
  output logic               en_b,
  output logic               we_a,
  output logic               we_b,
  output logic [AW-1:0]      addr_a,
  output logic [AW-1:0]      addr_b,
  output logic [COUNT_W-1:0] din_a,
  output logic [COUNT_W-1:0] din_b
);

  // Base of the odd-address histogram array.
  localparam logic [AW-1:0] ODD_BASE = AW'(1) << BPP;

  logic stage;  // 0: first step (histograms), 1: second step (merge)
  logic [BPP-1:0] sel_a, sel_b;

  assign stage = (op == HOP_MERGE);
  // Index presented to each port: the pixel value in the first step, the counter otherwise.
  assign sel_a = (op == HOP_INCR) ? pix_a : idx;
  assign sel_b = (op == HOP_INCR) ? pix_b : idx;
  assign addr_a = {1'b0, sel_a};
  assign addr_b = {1'b0, sel_b} + ODD_BASE;

  always_comb begin
    en_a  = (op != HOP_NONE);
    en_b  = (op != HOP_NONE);
    we_a  = (op != HOP_NONE);
    we_b  = (op == HOP_INCR) || (op == HOP_CLEAR);
    din_a = stage ? (dout_a + dout_b) : (dout_a + COUNT_W'(1));
    din_b = dout_b + COUNT_W'(1);
    if (op == HOP_CLEAR) begin
      din_a = '0;
      din_b = '0;
    end
  end

endmodule
