// End-to-end testbench for phc_top at reduced sizes (BPP = 3, 8 x 8 images and frames).
//
// Both designs run concurrently. The memory-based one is loaded and run on three images
// (random, one value only, a ramp) and the stream-based one on three frames (random with
// gaps, one value only, random without gaps); every histogram is checked bin by bin against
// one counted here, and the cycle counts against 2 * 2**BPP + NPIX/2 + 1 busy cycles (no
// gaps) and 2**BPP merge cycles. It also counts how often each mechanism of the design
// occurred and fails if one never did: the clear pass, an increment pair whose two pixels
// hit the same bin value, an increment of the bin incremented in the previous cycle on the
// same port, the merge, a stream gap, a load attempt while busy (must be ignored), and a
// second image computed after a first without reset.
module tb_phc_top;
  import phc_pkg::*;
  localparam int B = 3;
  localparam int N = 8;
  localparam int SN = 8;
  localparam int CW = DEF_COUNT_W;
  localparam int NB = 1 << B, NPIX = N * N, SNPAIR = SN * SN / 2;
  localparam int LAW = $clog2(NPIX) - 1;
  localparam int WATCHDOG = 4 * (3 * NPIX + 3 * SNPAIR * 2) + 40 * NB + 1000;

  logic clk, clk2x, rst;
  logic m_ld_we, m_start, m_busy, m_stage, m_done, m_res_valid;
  logic [LAW-1:0] m_ld_pair;
  logic [B-1:0] m_ld_pix_a, m_ld_pix_b, m_res_bin;
  logic [CW-1:0] m_res_count;
  logic s_start, s_valid, s_ready, s_busy, s_stage, s_done, s_res_valid;
  logic [B-1:0] s_pix_a, s_pix_b, s_res_bin;
  logic [CW-1:0] s_res_count;
  int checks = 0, failures = 0;

  phc_top #(.BPP(B), .IMG_N(N), .STREAM_N(SN), .COUNT_W(CW)) dut (.*);

  initial begin
    clk = 0; clk2x = 0;
    forever begin
      #5 clk2x = 1; clk = ~clk;
      #5 clk2x = 0;
    end
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  // ---------------- mechanism counters ----------------
  int n_clear, n_same_pair, n_raw, n_merge, n_gap, n_ld_busy, n_second;
  int m_busy_c, m_stage_c, s_busy_c, s_stage_c;
  hist_op_e m_prev_op, s_prev_op;
  logic [B-1:0] m_prev_a, s_prev_a;
  always @(posedge clk) begin
    if (m_busy) m_busy_c++;
    if (m_stage) m_stage_c++;
    if (s_busy) s_busy_c++;
    if (s_stage) s_stage_c++;
    if (dut.u_mem.u_eng.op == HOP_CLEAR && dut.u_mem.u_eng.idx == B'(NB - 1)) n_clear++;
    if (dut.u_stream.u_eng.op == HOP_CLEAR && dut.u_stream.u_eng.idx == B'(NB - 1)) n_clear++;
    if (dut.u_mem.u_eng.op == HOP_INCR) begin
      if (dut.u_mem.u_eng.pix_a == dut.u_mem.u_eng.pix_b) n_same_pair++;
      if (m_prev_op == HOP_INCR && m_prev_a == dut.u_mem.u_eng.pix_a) n_raw++;
    end
    if (dut.u_stream.u_eng.op == HOP_INCR) begin
      if (dut.u_stream.u_eng.pix_a == dut.u_stream.u_eng.pix_b) n_same_pair++;
      if (s_prev_op == HOP_INCR && s_prev_a == dut.u_stream.u_eng.pix_a) n_raw++;
    end
    if (m_res_valid && !rst) n_merge++;
    if (s_res_valid && !rst) n_merge++;
    if (s_ready && !s_valid) n_gap++;
    m_prev_op <= dut.u_mem.u_eng.op;
    m_prev_a  <= dut.u_mem.u_eng.pix_a;
    s_prev_op <= dut.u_stream.u_eng.op;
    s_prev_a  <= dut.u_stream.u_eng.pix_a;
  end

  // ---------------- memory-based design ----------------
  logic [B-1:0] img [NPIX];
  int m_exp [NB];
  logic m_fin;

  task automatic m_run(input int kind);
    int nres;
    foreach (m_exp[i]) m_exp[i] = 0;
    for (int p = 0; p < NPIX; p++) begin
      case (kind)
        0: img[p] = B'($urandom);
        1: img[p] = B'(NB - 1);
        default: img[p] = B'(p * NB / NPIX);
      endcase
      m_exp[img[p]]++;
    end
    for (int k = 0; k < NPIX / 2; k++) begin
      m_ld_we = 1; m_ld_pair = LAW'(k); m_ld_pix_a = img[2 * k]; m_ld_pix_b = img[2 * k + 1];
      @(posedge clk); #1;
    end
    m_ld_we = 0; m_start = 1;
    @(posedge clk); #1 m_start = 0;
    m_busy_c = 0; m_stage_c = 0; nres = 0;
    while (1) begin
      // try to overwrite the image while the computation runs: must be ignored
      m_ld_we = 1'($urandom); m_ld_pair = LAW'($urandom);
      m_ld_pix_a = B'($urandom); m_ld_pix_b = B'($urandom);
      #1;
      if (m_ld_we && m_busy) n_ld_busy++;
      if (m_res_valid) begin
        check(m_res_bin == B'(nres), "mem: bin order");
        check(m_res_count == CW'(m_exp[nres]),
              $sformatf("mem image %0d bin %0d = %0d expected %0d", kind, nres, m_res_count, m_exp[nres]));
        nres++;
      end
      if (m_done) break;
      @(posedge clk); #1;
    end
    m_ld_we = 0;
    check(nres == NB, "mem: all bins delivered");
    check(m_stage_c == NB, $sformatf("mem: merge %0d cycles", m_stage_c));
    check(m_busy_c == 2 * NB + NPIX / 2 + 1, $sformatf("mem: busy %0d cycles", m_busy_c));
    @(posedge clk); #1;
  endtask

  // ---------------- stream-based design ----------------
  int s_exp [NB];
  logic s_fin;

  task automatic s_run(input int kind);
    int nres, sent;
    foreach (s_exp[i]) s_exp[i] = 0;
    s_start = 1;
    @(posedge clk); #1 s_start = 0;
    s_busy_c = 0; s_stage_c = 0; nres = 0; sent = 0;
    while (1) begin
      s_valid = (kind == 0) ? 1'($urandom) : 1'b1;
      s_pix_a = (kind == 1) ? B'(2) : B'($urandom);
      s_pix_b = (kind == 1) ? B'(2) : B'($urandom);
      #1;
      if (s_valid && s_ready) begin
        s_exp[s_pix_a]++; s_exp[s_pix_b]++; sent++;
      end
      if (s_res_valid) begin
        check(s_res_bin == B'(nres), "stream: bin order");
        check(s_res_count == CW'(s_exp[nres]),
              $sformatf("stream frame %0d bin %0d = %0d expected %0d", kind, nres, s_res_count, s_exp[nres]));
        nres++;
      end
      if (s_done) break;
      @(posedge clk); #1;
    end
    s_valid = 0;
    check(sent == SNPAIR, "stream: frame length");
    check(nres == NB, "stream: all bins delivered");
    check(s_stage_c == NB, "stream: merge cycles");
    if (kind != 0) check(s_busy_c == 2 * NB + SNPAIR + 1, $sformatf("stream: busy %0d cycles", s_busy_c));
    @(posedge clk); #1;
  endtask

  initial begin
    rst = 1; m_ld_we = 0; m_start = 0; m_ld_pair = 0; m_ld_pix_a = 0; m_ld_pix_b = 0;
    s_start = 0; s_valid = 0; s_pix_a = 0; s_pix_b = 0; m_fin = 0; s_fin = 0;
    n_clear = 0; n_same_pair = 0; n_raw = 0; n_merge = 0; n_gap = 0; n_ld_busy = 0; n_second = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    fork
      begin
        for (int k = 0; k < 3; k++) begin
          m_run(k);
          if (k > 0) n_second++;
        end
        m_fin = 1;
      end
      begin
        for (int k = 0; k < 3; k++) begin
          s_run(k);
          if (k > 0) n_second++;
        end
        s_fin = 1;
      end
    join
    $display("mechanisms: clear=%0d same_bin_pair=%0d back_to_back_bin=%0d merge_results=%0d stream_gaps=%0d load_while_busy=%0d repeat_images=%0d",
             n_clear, n_same_pair, n_raw, n_merge, n_gap, n_ld_busy, n_second);
    check(n_clear == 6, "clear pass ran once per image");
    check(n_same_pair > 0, "same-bin pair occurred");
    check(n_raw > 0, "back-to-back update of one bin occurred");
    check(n_merge == 6 * NB, "merge results");
    check(n_gap > 0, "stream gap occurred");
    check(n_ld_busy > 0, "load attempt while busy occurred");
    check(n_second == 4, "repeated images without reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
