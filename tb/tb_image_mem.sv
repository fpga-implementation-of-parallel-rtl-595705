// Self-checking testbench for image_mem (memory block 1).
// Fills a 64-pixel memory through both ports at once, then reads every address back through
// both ports with random address pairs, checking each pixel one cycle after its read against
// a reference array. Also checks that dout holds its value across a write cycle.
module tb_image_mem;
  localparam int W = 8, D = 64, AW = 6;
  logic clk = 0;
  logic rw_a, rw_b;
  logic [AW-1:0] addr_a, addr_b;
  logic [W-1:0] din_a, din_b, dout_a, dout_b;
  logic [W-1:0] ref_mem [D];
  int checks = 0, failures = 0;

  image_mem #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    logic [AW-1:0] ea, eb;
    logic [W-1:0] hold_a;
    rw_a = 0; rw_b = 0; addr_a = 0; addr_b = 0; din_a = 0; din_b = 0;
    // load: port A even, port B odd addresses
    for (int k = 0; k < D / 2; k++) begin
      @(posedge clk); #1;
      rw_a = 1; rw_b = 1;
      addr_a = AW'(2 * k); addr_b = AW'(2 * k + 1);
      din_a = W'($urandom); din_b = W'($urandom);
      ref_mem[2 * k] = din_a; ref_mem[2 * k + 1] = din_b;
    end
    @(posedge clk); #1;
    rw_a = 0; rw_b = 0;
    // random reads on both ports
    for (int k = 0; k < 200; k++) begin
      ea = AW'($urandom); eb = AW'($urandom);
      addr_a = ea; addr_b = eb;
      @(posedge clk); #1;
      check(dout_a, ref_mem[ea], "port A read");
      check(dout_b, ref_mem[eb], "port B read");
    end
    // a write on port A must not disturb dout_a
    hold_a = dout_a;
    rw_a = 1; addr_a = 5; din_a = ~ref_mem[5]; ref_mem[5] = din_a;
    @(posedge clk); #1;
    check(dout_a, hold_a, "dout held during write");
    rw_a = 0; addr_a = 5;
    @(posedge clk); #1;
    check(dout_a, ref_mem[5], "read after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
