// Memory block 1: dual-ported image memory.
//
// Holds the DEPTH pixels of one image, WIDTH bits each. Both ports, 1A and 1B, are
// synchronous to the same clock. On a rising edge a port with rw = 1 writes din at addr;
// a port with rw = 0 reads addr and presents the pixel on dout from that edge until its next
// read, one cycle of latency. During histogram computation both ports only read (rw = 0), port
// 1A at even and port 1B at odd pixel addresses; the writes load an image beforehand. Two
// writes to the same address in one cycle are not allowed (an assertion checks it).
//
// The two ports, the read/write pins and the single system clock follow the hardware module of
// the paper (block RAM primitive, width = bits per pixel, depth = pixels per image). The
// one-cycle read latency and read-only-when-rw-is-0 behaviour are those of an FPGA block RAM.
module image_mem #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 512 * 512,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  // port 1A
  input  logic             rw_a,
  input  logic [AW-1:0]    addr_a,
  input  logic [WIDTH-1:0] din_a,
  output logic [WIDTH-1:0] dout_a,
  // port 1B
  input  logic             rw_b,
  input  logic [AW-1:0]    addr_b,
  input  logic [WIDTH-1:0] din_b,
  output logic [WIDTH-1:0] dout_b
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rw_a) mem[addr_a] <= din_a;
    else      dout_a      <= mem[addr_a];
    if (rw_b) mem[addr_b] <= din_b;
    else      dout_b      <= mem[addr_b];
  end

  a_no_double_write: assert property (@(posedge clk) !(rw_a && rw_b && addr_a == addr_b))
    else $error("image_mem: both ports write address %0d", addr_a);

endmodule
