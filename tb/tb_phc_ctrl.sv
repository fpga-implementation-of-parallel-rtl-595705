// Self-checking testbench for phc_ctrl.
// With BPP = 3 it runs two images. For each it checks the clear pass (8 cycles of HOP_CLEAR,
// idx 0..7), the first step (HOP_INCR exactly on cycles with pix_valid, hist_phase high, pixel
// pairs offered with random gaps, the 6th ending the step), the second step (8 cycles of
// HOP_MERGE with stage high, idx 0..7), the one-cycle done pulse and busy.
module tb_phc_ctrl;
  import phc_pkg::*;
  localparam int BPP = 3, NB = 1 << BPP, NPAIR = 6;
  logic clk = 0, rst, start, pix_valid, pix_last;
  hist_op_e op;
  logic [BPP-1:0] idx;
  logic hist_phase, stage, busy, done;
  int checks = 0, failures = 0;

  phc_ctrl #(.BPP(BPP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (op %0d idx %0d)", what, $time, op, idx);
    end
  endtask

  initial begin
    int sent, busy_cycles;
    rst = 1; start = 0; pix_valid = 0; pix_last = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int rep = 0; rep < 2; rep++) begin
      @(posedge clk); #1;
      check(!busy && op == HOP_NONE && !done, "idle");
      start = 1;
      @(posedge clk); #1 start = 0;
      busy_cycles = 0;
      for (int i = 0; i < NB; i++) begin
        #1 check(op == HOP_CLEAR && idx == BPP'(i) && busy && !hist_phase, "clear pass");
        busy_cycles++;
        @(posedge clk); #1;
      end
      sent = 0;
      while (sent < NPAIR) begin
        pix_valid = 1'($urandom);
        pix_last = pix_valid && (sent == NPAIR - 1);
        #1 check(hist_phase && !stage, "first step");
        check(op == (pix_valid ? HOP_INCR : HOP_NONE), "increment only on valid pairs");
        if (pix_valid) sent++;
        busy_cycles++;
        @(posedge clk); #1;
      end
      pix_valid = 0; pix_last = 0;
      for (int i = 0; i < NB; i++) begin
        #1 check(op == HOP_MERGE && idx == BPP'(i) && stage && !hist_phase, "merge pass");
        busy_cycles++;
        @(posedge clk); #1;
      end
      #1 check(done && !busy, "done pulse after the last merge");
      @(posedge clk); #2 check(!done, "done lasts one cycle");
      check(busy_cycles >= 2 * NB + NPAIR, "cycle count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
