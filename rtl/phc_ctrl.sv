// Stage controller of the 2-way parallel histogram computation.
//
// Sequences one image through three passes, one histogram-memory operation per system cycle:
//   CLEAR  2**BPP cycles: zero element idx of both histogram arrays (idx = 0 .. 2**BPP-1).
//   HIST   first step: for every cycle with pix_valid, an increment of the two bins addressed
//          by the even and the odd pixel; hist_phase = 1 tells the pixel source to deliver.
//          The pair flagged pix_last ends the step.
//   MERGE  second step, 2**BPP cycles: element idx of the two arrays is added into the first.
// start (in IDLE) begins a new image. done pulses in the cycle after the last merge, the cycle
// in which the last result leaves the engine; busy is high from start until then. stage is 0
// in the first step and 1 in the second. The same up-counter idx serves the clear and the
// merge pass.
//
// The two steps, the stage signal and the +1 up-counter stepping through the histogram
// indices are the paper's. The clear pass, which lets the engine start every image from an
// all-zero memory, and the start/done handshake are this design's additions.
module phc_ctrl
  import phc_pkg::*;
#(
  parameter int unsigned BPP = 8
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic           pix_valid,
  input  logic           pix_last,
  output hist_op_e       op,
  output logic [BPP-1:0] idx,
  output logic           hist_phase,
  output logic           stage,
  output logic           busy,
  output logic           done
);

  typedef enum logic [1:0] {S_IDLE, S_CLEAR, S_HIST, S_MERGE} state_e;

  state_e state;
  logic   idx_last;

  assign idx_last   = (idx == {BPP{1'b1}});
  assign hist_phase = (state == S_HIST);
  assign stage      = (state == S_MERGE);
  assign busy       = (state != S_IDLE);

  always_comb begin
    unique case (state)
      S_CLEAR: op = HOP_CLEAR;
      S_HIST:  op = pix_valid ? HOP_INCR : HOP_NONE;
      S_MERGE: op = HOP_MERGE;
      default: op = HOP_NONE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      idx   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_CLEAR;
          idx   <= '0;
        end
        S_CLEAR: begin
          idx <= idx + 1'b1;
          if (idx_last) state <= S_HIST;
        end
        S_HIST: if (pix_valid && pix_last) begin
          state <= S_MERGE;
          idx   <= '0;
        end
        S_MERGE: begin
          idx <= idx + 1'b1;
          if (idx_last) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
