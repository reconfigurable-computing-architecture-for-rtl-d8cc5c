// bt_block: the back-tracker. Walks the optimum path of the previous row from its
// last column to its first.
//
// On the first strobe of a row (row_start) the disparity counter is loaded with
// the Min Tree result, the last disparity D(NC-1) of the previous row. On every
// strobe a multiplexer picks, out of the R steps popped from the path storage for
// this column, the step of the path the counter is on; the counter then
// increments, holds or decrements by that step: D(x-1) = D(x) + s(x, D(x)).
// The chosen step goes to the disparity storage. On the last strobe of the row
// the counter holds D(0), which is kept in first_d for the forward-tracker.
//
// Timing: d_cur and step_out are combinational for the current strobe; the
// counter and first_d update on en=1.
module bt_block
  import stereo_pkg::*;
#(
  parameter int R  = 30,
  parameter int DW = disp_width(R)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic          row_start,
  input  logic          row_end,
  input  logic [DW-1:0] last_d,        // from the Min Tree
  input  step_t         steps_in [R],  // popped from the path storage
  output step_t         step_out,      // to the disparity storage
  output logic [DW-1:0] d_cur,         // back-tracked disparity of this strobe
  output logic [DW-1:0] first_d        // D(0) of the row just back-tracked
);
  logic [DW-1:0] cnt;

  assign d_cur    = row_start ? last_d : cnt;
  assign step_out = (int'(d_cur) < R) ? steps_in[d_cur] : STEP_ZERO;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      first_d <= '0;
    end else if (en) begin
      case (step_out)
        STEP_UP:   cnt <= d_cur + 1'b1;
        STEP_DOWN: cnt <= d_cur - 1'b1;
        default:   cnt <= d_cur;
      endcase
      if (row_end) first_d <= d_cur;
    end
  end
endmodule
