// Self-checking testbench for rw_phase.
// clk and clk2x are generated with aligned rising edges. rst is released right after a clk
// edge, as a clk-domain register would release it. rw must stay 0 during reset and then be
// 0 in the first half and 1 in the second half of every clk cycle.
module tb_rw_phase;
  logic clk, clk2x, rst, rw;
  int checks = 0, failures = 0;

  rw_phase dut (.clk2x, .rst, .rw);

  initial begin
    clk = 0; clk2x = 0;
    forever begin
      #5 clk2x = 1; clk = ~clk;
      #5 clk2x = 0;
    end
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic exp, input string what);
    checks++;
    if (rw !== exp) begin
      failures++;
      $display("FAIL %s at %0t: rw=%0d expected %0d", what, $time, rw, exp);
    end
  endtask

  initial begin
    rst = 1;
    repeat (3) @(posedge clk);
    #2 check(1'b0, "held in reset");
    @(negedge clk); #2 check(1'b0, "held in reset, second half");
    @(posedge clk); rst <= 0;
    for (int k = 0; k < 100; k++) begin
      @(posedge clk); #2 check(1'b0, "first half reads");
      @(negedge clk); #2 check(1'b1, "second half writes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
