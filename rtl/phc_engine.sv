// Histogram engine of the 2-way PHC: memory block 2 with its datapath and control.
//
// Takes one pair of pixels per system cycle (pix_a from an even, pix_b from an odd image
// address) and keeps one histogram for each in the two halves of a dual-ported memory clocked
// at twice the system clock. In each system cycle both ports read their bin in the first half
// and write it back incremented in the second half, so two pixels are counted per cycle and,
// since the halves are disjoint, two equal pixels never collide. After the pair flagged
// pix_last the engine adds the two histograms element by element (2**BPP cycles) and writes
// the sums into the first array; each sum is also delivered on res_valid / res_bin / res_count,
// in bin order, one cycle after it is formed. Every image starts with a 2**BPP-cycle clear
// pass. Pixels are accepted only while hist_phase is high.
//
// Clocks: clk2x must be twice clk with aligned rising edges; rst is synchronous to clk.
// pix_* must come straight from clk-domain registers, since the memory samples the address
// derived from them in the middle of the cycle.
//
// Cycle count per image: 2**BPP (clear) + one cycle per pixel pair + 2**BPP (merge).
module phc_engine
  import phc_pkg::*;
#(
  parameter int unsigned BPP     = DEF_BPP,
  parameter int unsigned COUNT_W = DEF_COUNT_W
) (
  input  logic               clk,
  input  logic               clk2x,
  input  logic               rst,
  input  logic               start,
  input  logic               pix_valid,
  input  logic [BPP-1:0]     pix_a,
  input  logic [BPP-1:0]     pix_b,
  input  logic               pix_last,
  output logic               hist_phase,
  output logic               stage,
  output logic               busy,
  output logic               done,
  output logic               res_valid,
  output logic [BPP-1:0]     res_bin,
  output logic [COUNT_W-1:0] res_count
);

  localparam int unsigned AW = BPP + 1;

  hist_op_e           op;
  logic [BPP-1:0]     idx;
  logic               rst_q, rw;
  logic               en_a, en_b, we_a, we_b;
  logic [AW-1:0]      addr_a, addr_b;
  logic [COUNT_W-1:0] din_a, din_b, dout_a, dout_b;

  // Reset for the clk2x domain, released on a clk edge so rw lines up with the system cycle.
  always_ff @(posedge clk) rst_q <= rst;

  phc_ctrl #(.BPP(BPP)) u_ctrl (
    .clk, .rst, .start, .pix_valid, .pix_last,
    .op, .idx, .hist_phase, .stage, .busy, .done
  );

  rw_phase u_rw (.clk2x, .rst(rst_q), .rw);

  hist_datapath #(.BPP(BPP), .COUNT_W(COUNT_W)) u_dp (
    .op, .pix_a, .pix_b, .idx, .dout_a, .dout_b,
    .en_a, .en_b, .we_a, .we_b, .addr_a, .addr_b, .din_a, .din_b
  );

  // A port reads in the first half of every active cycle and writes in the second half
  // only when its operation writes.
  hist_mem #(.BPP(BPP), .COUNT_W(COUNT_W)) u_mem (
    .clk2x,
    .en_a(en_a && (!rw || we_a)), .rw_a(rw), .addr_a, .din_a, .dout_a,
    .en_b(en_b && (!rw || we_b)), .rw_b(rw), .addr_b, .din_b, .dout_b
  );

  // Merge results, captured at the end of the cycle that writes them.
  always_ff @(posedge clk) begin
    if (rst) begin
      res_valid <= 1'b0;
      res_bin   <= '0;
      res_count <= '0;
    end else begin
      res_valid <= (op == HOP_MERGE);
      res_bin   <= idx;
      res_count <= din_a;
    end
  end

endmodule
