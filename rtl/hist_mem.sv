// Memory block 2: dual-ported histogram memory, clocked at twice the system clock.
//
// Holds 2 * 2**BPP histogram elements of COUNT_W bits: the even-address histogram at
// [0, 2**BPP) and the odd-address histogram at [2**BPP, 2*2**BPP). Both ports run on clk2x.
// On a rising clk2x edge a port with en = 1 either writes din at addr (rw = 1) or reads addr
// into dout (rw = 0); dout holds its value until the next read. The surrounding logic drives
// rw so that each system-clock cycle gives every port one read, on the edge in the middle of
// the cycle, and one write, on the edge that ends it: a read-modify-write per port per
// system cycle. With port A confined to the first array and port B to the second, the ports
// never write the same element; an assertion checks that no two writes collide.
//
// Two ports, clock2x and the rw pins follow the paper's hardware module; depth 2 * 2**bpp and
// the element width are its block RAM configuration. The enable pin is an addition of this
// design, so that idle cycles neither read nor write.
module hist_mem #(
  parameter int unsigned BPP     = 8,
  parameter int unsigned COUNT_W = 32,
  localparam int unsigned AW    = BPP + 1,
  localparam int unsigned DEPTH = 2 << BPP
) (
  input  logic               clk2x,
  // port 2A
  input  logic               en_a,
  input  logic               rw_a,
  input  logic [AW-1:0]      addr_a,
  input  logic [COUNT_W-1:0] din_a,
  output logic [COUNT_W-1:0] dout_a,
  // port 2B
  input  logic               en_b,
  input  logic               rw_b,
  input  logic [AW-1:0]      addr_b,
  input  logic [COUNT_W-1:0] din_b,
  output logic [COUNT_W-1:0] dout_b
);

  logic [COUNT_W-1:0] mem [DEPTH];

  always_ff @(posedge clk2x) begin
    if (en_a) begin
      if (rw_a) mem[addr_a] <= din_a;
      else      dout_a      <= mem[addr_a];
    end
    if (en_b) begin
      if (rw_b) mem[addr_b] <= din_b;
      else      dout_b      <= mem[addr_b];
    end
  end

  a_no_collision: assert property (@(posedge clk2x)
      !(en_a && rw_a && en_b && rw_b && addr_a == addr_b))
    else $error("hist_mem: both ports write element %0d", addr_a);

endmodule
