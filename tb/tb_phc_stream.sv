// Self-checking testbench for phc_stream, the stream-fed 2-way histogram computation.
// With BPP = 4 and 8 x 8 frames (32 pixel pairs) it sends four frames: random pixels with
// random gaps in s_valid, random pixels without gaps, a frame of one value only, and random
// pixels again. Each result is compared with a histogram counted here. It also checks that
// s_ready is low outside the first step and drops after the last pair, and the cycle counts:
// 2**BPP cycles of clear, 2**BPP cycles of merge, and, for a frame without gaps,
// 2 * 2**BPP + NPAIR + 1 busy cycles.
module tb_phc_stream;
  localparam int B = 4, N = 8, NPAIR = N * N / 2, NB = 1 << B, CW = 32;
  logic clk, clk2x, rst, start, s_valid, s_ready, busy, stage, done, res_valid;
  logic [B-1:0] s_pix_a, s_pix_b, res_bin;
  logic [CW-1:0] res_count;
  int checks = 0, failures = 0;
  int expc [NB];
  int busy_c, stage_c, ready_c, stalls;

  phc_stream #(.BPP(B), .IMG_N(N), .COUNT_W(CW)) dut (.*);

  initial begin
    clk = 0; clk2x = 0;
    forever begin
      #5 clk2x = 1; clk = ~clk;
      #5 clk2x = 0;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (busy) busy_c++;
    if (stage) stage_c++;
    if (s_ready) ready_c++;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int sent, nres;
    rst = 1; start = 0; s_valid = 0; s_pix_a = 0; s_pix_b = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int rep = 0; rep < 4; rep++) begin
      foreach (expc[i]) expc[i] = 0;
      @(posedge clk); #1 start = 1;
      @(posedge clk); #1 start = 0;
      busy_c = 0; stage_c = 0; ready_c = 0; sent = 0; nres = 0;
      while (!done) begin
        if (sent < NPAIR) begin
          s_valid = (rep == 0) ? 1'($urandom) : 1'b1;
          s_pix_a = (rep == 2) ? B'(5) : B'($urandom);
          s_pix_b = (rep == 2) ? B'(5) : B'($urandom);
        end else begin
          s_valid = 1'($urandom);
        end
        #1;
        if (s_ready && !s_valid) stalls++;
        if (s_valid && s_ready) begin
          expc[s_pix_a]++; expc[s_pix_b]++;
          sent++;
        end
        if (sent >= NPAIR && !(s_valid && s_ready)) check(!s_ready, "no pair taken after the last");
        if (res_valid) begin
          check(res_bin == B'(nres), "result bin order");
          check(res_count == CW'(expc[nres]),
                $sformatf("frame %0d bin %0d = %0d expected %0d", rep, nres, res_count, expc[nres]));
          nres++;
        end
        @(posedge clk); #1;
      end
      if (res_valid) begin
        check(res_count == CW'(expc[nres]), "last bin");
        nres++;
      end
      s_valid = 0;
      check(sent == NPAIR, "frame length");
      check(nres == NB, "all bins delivered");
      check(stage_c == NB, $sformatf("merge %0d cycles", stage_c));
      if (rep != 0)
        check(busy_c == 2 * NB + NPAIR + 1, $sformatf("busy %0d cycles", busy_c));
      else
        check(busy_c > 2 * NB + NPAIR + 1, "gaps lengthen the first step");
    end
    check(stalls > 0, "stream gaps occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
