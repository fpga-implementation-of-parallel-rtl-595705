// Self-checking testbench for hist_mem (memory block 2).
// Random reads and writes on both ports, port A inside the first histogram array and port B
// inside the second, compared with a reference array. Checks read data one clk2x cycle after
// each read and that disabled ports neither read nor write.
module tb_hist_mem;
  localparam int BPP = 3, CW = 16, AW = BPP + 1, D = 2 << BPP;
  logic clk2x = 0;
  logic en_a, rw_a, en_b, rw_b;
  logic [AW-1:0] addr_a, addr_b;
  logic [CW-1:0] din_a, din_b, dout_a, dout_b;
  logic [CW-1:0] ref_mem [D];
  logic [CW-1:0] exp_a, exp_b;
  int checks = 0, failures = 0;

  hist_mem #(.BPP(BPP), .COUNT_W(CW)) dut (.*);

  always #5 clk2x = ~clk2x;

  initial begin
    repeat (5000) @(posedge clk2x);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [CW-1:0] got, input logic [CW-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    en_a = 0; en_b = 0; rw_a = 0; rw_b = 0; addr_a = 0; addr_b = 0; din_a = 0; din_b = 0;
    // initialise everything
    for (int i = 0; i < D / 2; i++) begin
      @(posedge clk2x); #1;
      en_a = 1; rw_a = 1; addr_a = AW'(i); din_a = CW'(i * 7 + 1);
      en_b = 1; rw_b = 1; addr_b = AW'(i + D / 2); din_b = CW'(i * 11 + 3);
      ref_mem[i] = din_a; ref_mem[i + D / 2] = din_b;
    end
    @(posedge clk2x); #1;
    en_a = 0; en_b = 0;
    exp_a = dout_a; exp_b = dout_b;
    for (int k = 0; k < 1000; k++) begin
      en_a = 1'($urandom); rw_a = 1'($urandom);
      en_b = 1'($urandom); rw_b = 1'($urandom);
      addr_a = AW'($urandom % (D / 2));
      addr_b = AW'(D / 2 + $urandom % (D / 2));
      din_a = CW'($urandom); din_b = CW'($urandom);
      if (en_a && !rw_a) exp_a = ref_mem[addr_a];
      if (en_b && !rw_b) exp_b = ref_mem[addr_b];
      if (en_a && rw_a) ref_mem[addr_a] = din_a;
      if (en_b && rw_b) ref_mem[addr_b] = din_b;
      @(posedge clk2x); #1;
      check(dout_a, exp_a, "port A");
      check(dout_b, exp_b, "port B");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
