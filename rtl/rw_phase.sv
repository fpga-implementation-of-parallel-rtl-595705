// Read/write phase generator for the histogram memory (rw2A / rw2B).
//
// A flip-flop on clk2x whose input is its own inverted output: rw toggles on every clk2x
// edge, so it is 0 for one clk2x period and 1 for the next. clk2x runs at twice the system
// clock with its rising edges aligned to those of clk. rst must be synchronous to clk (it is
// sampled on a clk2x edge that coincides with a clk edge); while it is high rw is held at 0.
// After rst falls, rw is 0 during the first half of every system cycle and 1 during the second
// half. Sampled by the memory, the edge in the middle of a cycle therefore sees rw = 0 (read)
// and the edge that ends it sees rw = 1 (write).
//
// The toggle flip-flop is the one drawn for rw2A and rw2B in the paper; the reset value and
// the alignment rule are this design's choice.
module rw_phase (
  input  logic clk2x,
  input  logic rst,
  output logic rw
);

  always_ff @(posedge clk2x) begin
    if (rst) rw <= 1'b0;
    else     rw <= ~rw;
  end

endmodule
