// Even/odd pixel address generator (program counters PC1 and PC2).
//
// An up-counter stepping by two produces the even pixel address addr_a for port 1A of the
// image memory; an adder forms addr_b = addr_a + 1 for port 1B. start clears the counter to
// address 0 and arms it. While run is high and the armed counter has not yet passed the last
// pair, one pair of addresses is issued per clock cycle (issue = 1) and the counter advances.
// last marks the final pair, addresses NPIX-2 and NPIX-1; after it the generator stops until
// the next start. NPIX, the number of pixels, must be even.
//
// The +2 counter and the +1 adder are those of the paper; start, run and the stop after
// the last pair are this design's control.
module pixel_addr_gen #(
  parameter int unsigned NPIX = 512 * 512,
  localparam int unsigned AW = (NPIX > 1) ? $clog2(NPIX) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic          run,
  output logic [AW-1:0] addr_a,
  output logic [AW-1:0] addr_b,
  output logic          issue,
  output logic          last
);

  logic armed;

  assign addr_b = addr_a + AW'(1);
  assign issue  = run && armed;
  assign last   = issue && (addr_a == AW'(NPIX - 2));

  always_ff @(posedge clk) begin
    if (rst) begin
      addr_a <= '0;
      armed  <= 1'b0;
    end else if (start) begin
      addr_a <= '0;
      armed  <= 1'b1;
    end else if (issue) begin
      addr_a <= addr_a + AW'(2);
      if (last) armed <= 1'b0;
    end
  end

  initial begin
    assert (NPIX >= 2 && NPIX % 2 == 0)
      else $fatal(1, "pixel_addr_gen: NPIX must be even and at least 2");
  end

endmodule
