// Self-checking testbench for phc, the memory-based 2-way histogram computation.
//
// dut_ex (BPP = 2, 4 x 4 image) computes the worked example of the design description:
// pixels 1 1 2 3 1 3 0 2 2 1 1 0 0 1 3 2 give the histogram 3 6 4 3; after the first step the
// even array must hold 2 3 2 1 and the odd array 1 3 2 2.
// dut_rnd (BPP = 4, 16 x 16 image) computes three images: random pixels, an image of one
// value only (every pair collides on the same bin) and a run image, each compared with a
// histogram counted here. For both, the cycle counts are checked: 2**BPP cycles of clear,
// NPIX/2 + 1 cycles of first step, 2**BPP cycles of merge (stage high). For the example, the
// addresses, write data and read data of the histogram memory are also checked cycle by cycle
// against the published functional simulation of it (8 first-step and 4 merge cycles).
module tb_phc;
  localparam int B1 = 2, N1 = 4, P1 = N1 * N1;
  localparam int B2 = 4, N2 = 16, P2 = N2 * N2;
  localparam int CW = 32;

  logic clk, clk2x, rst;
  int checks = 0, failures = 0;

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

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- worked example ----------------
  logic ld_we1, start1, busy1, stage1, done1, rv1;
  logic [2:0] ld_pair1;
  logic [B1-1:0] lda1, ldb1, rbin1;
  logic [CW-1:0] rcnt1;
  phc #(.BPP(B1), .IMG_N(N1), .COUNT_W(CW)) dut_ex (
    .clk, .clk2x, .rst, .ld_we(ld_we1), .ld_pair(ld_pair1), .ld_pix_a(lda1), .ld_pix_b(ldb1),
    .start(start1), .busy(busy1), .stage(stage1), .done(done1),
    .res_valid(rv1), .res_bin(rbin1), .res_count(rcnt1));

  // ---------------- random images ----------------
  logic ld_we2, start2, busy2, stage2, done2, rv2;
  logic [6:0] ld_pair2;
  logic [B2-1:0] lda2, ldb2, rbin2;
  logic [CW-1:0] rcnt2;
  phc #(.BPP(B2), .IMG_N(N2), .COUNT_W(CW)) dut_rnd (
    .clk, .clk2x, .rst, .ld_we(ld_we2), .ld_pair(ld_pair2), .ld_pix_a(lda2), .ld_pix_b(ldb2),
    .start(start2), .busy(busy2), .stage(stage2), .done(done2),
    .res_valid(rv2), .res_bin(rbin2), .res_count(rcnt2));

  // busy / stage cycle counters
  int busy_c1, stage_c1, busy_c2, stage_c2;
  always @(posedge clk) begin
    if (busy1) busy_c1++;
    if (stage1) stage_c1++;
    if (busy2) busy_c2++;
    if (stage2) stage_c2++;
  end

  // Per-cycle values of the worked example's first step and merge, as the histogram memory
  // sees them at the write edge: addresses (odd array at 4 + bin), write data, read data.
  localparam int NW = P1 / 2 + 4;
  int w_addr_a [NW] = '{1, 2, 1, 0, 2, 1, 0, 3, 0, 1, 2, 3};
  int w_addr_b [NW] = '{5, 7, 7, 6, 5, 4, 5, 6, 4, 5, 6, 7};
  int w_din_a  [NW] = '{1, 1, 2, 1, 2, 3, 2, 1, 3, 6, 4, 3};
  int w_din_b  [8]  = '{1, 1, 2, 1, 2, 1, 3, 2};
  int w_dout_a [NW] = '{0, 0, 1, 0, 1, 2, 1, 0, 2, 3, 2, 1};
  int w_dout_b [NW] = '{0, 0, 1, 0, 1, 0, 2, 1, 1, 3, 2, 2};
  int nw = 0;
  always @(posedge clk) begin
    if (!rst && (dut_ex.u_eng.op == phc_pkg::HOP_INCR || dut_ex.u_eng.op == phc_pkg::HOP_MERGE)) begin
      if (nw < NW) begin
        check(int'(dut_ex.u_eng.addr_a) == w_addr_a[nw], $sformatf("example cycle %0d: addr2A", nw));
        check(int'(dut_ex.u_eng.addr_b) == w_addr_b[nw], $sformatf("example cycle %0d: addr2B", nw));
        check(int'(dut_ex.u_eng.din_a) == w_din_a[nw], $sformatf("example cycle %0d: din2A", nw));
        if (nw < 8)
          check(int'(dut_ex.u_eng.din_b) == w_din_b[nw], $sformatf("example cycle %0d: din2B", nw));
        check(int'(dut_ex.u_eng.dout_a) == w_dout_a[nw], $sformatf("example cycle %0d: dout2A", nw));
        check(int'(dut_ex.u_eng.dout_b) == w_dout_b[nw], $sformatf("example cycle %0d: dout2B", nw));
      end
      nw++;
    end
  end

  int exp2 [1 << B2];
  logic [CW-1:0] even_snap [4];
  logic [B2-1:0] img2 [P2];

  initial begin
    logic [B1-1:0] ex [P1] = '{1, 1, 2, 3, 1, 3, 0, 2, 2, 1, 1, 0, 0, 1, 3, 2};
    int ex_hist [4] = '{3, 6, 4, 3};
    int ex_even [4] = '{2, 3, 2, 1};
    int ex_odd [4] = '{1, 3, 2, 2};
    int nres, first_step;
    rst = 1; ld_we1 = 0; start1 = 0; ld_pair1 = 0; lda1 = 0; ldb1 = 0;
    ld_we2 = 0; start2 = 0; ld_pair2 = 0; lda2 = 0; ldb2 = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;

    // ---- worked example ----
    for (int k = 0; k < P1 / 2; k++) begin
      @(posedge clk); #1;
      ld_we1 = 1; ld_pair1 = 3'(k); lda1 = ex[2 * k]; ldb1 = ex[2 * k + 1];
    end
    @(posedge clk); #1 ld_we1 = 0; start1 = 1;
    @(posedge clk); #1 start1 = 0;
    busy_c1 = 0; stage_c1 = 0; nres = 0; first_step = 0;
    while (!done1) begin
      if (busy1 && !stage1 && dut_ex.u_eng.hist_phase) first_step++;
      // in the first merge cycle nothing has been merged yet
      if (stage1 && stage_c1 == 0)
        for (int i = 0; i < 4; i++) even_snap[i] = dut_ex.u_eng.u_mem.mem[i];
      if (rv1) begin
        check(rbin1 == B1'(nres), "example: result bin order");
        check(rcnt1 == CW'(ex_hist[nres]), $sformatf("example: bin %0d = %0d", nres, rcnt1));
        nres++;
      end
      @(posedge clk); #1;
    end
    if (rv1) begin
      check(rcnt1 == CW'(ex_hist[nres]), "example: last bin");
      nres++;
    end
    check(nres == 4, "example: four results");
    check(nw == NW, "example: twelve histogram-memory cycles");
    for (int i = 0; i < 4; i++) begin
      check(dut_ex.u_eng.u_mem.mem[i] == CW'(ex_hist[i]), "example: merged array in memory");
      // the odd array is left as the first step made it
      check(dut_ex.u_eng.u_mem.mem[4 + i] == CW'(ex_odd[i]), "example: odd array");
    end
    for (int i = 0; i < 4; i++)
      check(even_snap[i] == CW'(ex_even[i]), "example: even array after the first step");
    check(first_step == P1 / 2 + 1, $sformatf("example: first step %0d cycles", first_step));
    check(stage_c1 == 4, $sformatf("example: merge %0d cycles", stage_c1));
    check(busy_c1 == 2 * 4 + P1 / 2 + 1, $sformatf("example: busy %0d cycles", busy_c1));

    // ---- random images ----
    for (int rep = 0; rep < 3; rep++) begin
      foreach (exp2[i]) exp2[i] = 0;
      for (int p = 0; p < P2; p++) begin
        case (rep)
          0: img2[p] = B2'($urandom);
          1: img2[p] = B2'(9);
          default: img2[p] = B2'(p / 20);
        endcase
        exp2[img2[p]]++;
      end
      for (int k = 0; k < P2 / 2; k++) begin
        @(posedge clk); #1;
        ld_we2 = 1; ld_pair2 = 7'(k); lda2 = img2[2 * k]; ldb2 = img2[2 * k + 1];
      end
      @(posedge clk); #1 ld_we2 = 0; start2 = 1;
      @(posedge clk); #1 start2 = 0;
      busy_c2 = 0; stage_c2 = 0; nres = 0;
      while (!done2 || rv2) begin
        if (rv2) begin
          check(rbin2 == B2'(nres), "random: result bin order");
          check(rcnt2 == CW'(exp2[nres]),
                $sformatf("random image %0d: bin %0d = %0d expected %0d", rep, nres, rcnt2, exp2[nres]));
          nres++;
        end
        if (done2) break;
        @(posedge clk); #1;
      end
      check(nres == 1 << B2, "random: all bins delivered");
      check(stage_c2 == 1 << B2, "random: merge takes 2**BPP cycles");
      check(busy_c2 == 2 * (1 << B2) + P2 / 2 + 1, $sformatf("random: busy %0d cycles", busy_c2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
