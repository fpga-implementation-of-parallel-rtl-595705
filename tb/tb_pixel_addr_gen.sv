// Self-checking testbench for pixel_addr_gen.
// For a 16-pixel image, runs the generator twice with run toggled at random, and checks on
// every cycle that issue follows run, that the issued pairs are (0,1), (2,3), ... (14,15) in
// order, that last flags only the final pair and that nothing is issued after it.
module tb_pixel_addr_gen;
  localparam int NPIX = 16, AW = 4;
  logic clk = 0, rst, start, run, issue, last;
  logic [AW-1:0] addr_a, addr_b;
  int checks = 0, failures = 0;

  pixel_addr_gen #(.NPIX(NPIX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int pair;
    rst = 1; start = 0; run = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int rep = 0; rep < 2; rep++) begin
      @(posedge clk); #1 start = 1;
      @(posedge clk); #1 start = 0;
      pair = 0;
      for (int k = 0; k < 60; k++) begin
        run = (k < 3) ? 1'b0 : 1'($urandom);
        #1;
        check(issue == (run && pair < NPIX / 2), "issue follows run until the last pair");
        if (issue) begin
          check(addr_a == AW'(2 * pair), "even address");
          check(addr_b == AW'(2 * pair + 1), "odd address");
          check(last == (pair == NPIX / 2 - 1), "last flag");
          pair++;
        end else begin
          check(!last, "no last without issue");
        end
        @(posedge clk); #1;
      end
      check(pair == NPIX / 2, "all pairs issued");
      run = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
