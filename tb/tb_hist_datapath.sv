// Self-checking testbench for hist_datapath.
// Applies random operations, pixels, indices and memory read data, and compares every
// output with values computed here from the operation table.
module tb_hist_datapath;
  import phc_pkg::*;
  localparam int BPP = 8, CW = 32, AW = BPP + 1;
  hist_op_e op;
  logic [BPP-1:0] pix_a, pix_b, idx;
  logic [CW-1:0] dout_a, dout_b, din_a, din_b;
  logic en_a, en_b, we_a, we_b;
  logic [AW-1:0] addr_a, addr_b;
  int checks = 0, failures = 0;

  hist_datapath #(.BPP(BPP), .COUNT_W(CW)) dut (.*);

  task automatic check(input logic [CW-1:0] got, input logic [CW-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s (op %0d): got %0d expected %0d", what, op, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      op = hist_op_e'($urandom % 4);
      pix_a = BPP'($urandom); pix_b = BPP'($urandom); idx = BPP'($urandom);
      dout_a = (k % 7 == 0) ? '1 : CW'($urandom);
      dout_b = CW'($urandom);
      #1;
      check(CW'(en_a), CW'(op != HOP_NONE), "en_a");
      check(CW'(en_b), CW'(op != HOP_NONE), "en_b");
      check(CW'(we_a), CW'(op != HOP_NONE), "we_a");
      check(CW'(we_b), CW'(op == HOP_INCR || op == HOP_CLEAR), "we_b");
      case (op)
        HOP_INCR: begin
          check(CW'(addr_a), CW'(pix_a), "addr_a incr");
          check(CW'(addr_b), CW'(pix_b) + 256, "addr_b incr");
          check(din_a, dout_a + 1, "din_a incr");
          check(din_b, dout_b + 1, "din_b incr");
        end
        HOP_MERGE: begin
          check(CW'(addr_a), CW'(idx), "addr_a merge");
          check(CW'(addr_b), CW'(idx) + 256, "addr_b merge");
          check(din_a, dout_a + dout_b, "din_a merge");
        end
        HOP_CLEAR: begin
          check(CW'(addr_a), CW'(idx), "addr_a clear");
          check(CW'(addr_b), CW'(idx) + 256, "addr_b clear");
          check(din_a, 0, "din_a clear");
          check(din_b, 0, "din_b clear");
        end
        default: ;
      endcase
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
