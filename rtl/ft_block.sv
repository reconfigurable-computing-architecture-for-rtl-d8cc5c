// ft_block: the forward-tracker. Rebuilds the optimum path in column order.
//
// On the first strobe of a row it starts from D(0), supplied by the back-tracker
// at the end of its pass; on the following strobes it applies the steps popped
// from the disparity storage: D(x) = D(x-1) - s, where s is the step that took
// the back-tracker from D(x) to D(x-1).
//
// Timing: the disparity of the strobe's column is registered in disp on en=1, so
// it is visible from the next cycle on.
module ft_block
  import stereo_pkg::*;
#(
  parameter int R  = 30,
  parameter int DW = disp_width(R)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic          row_start,
  input  logic [DW-1:0] first_d,
  input  step_t         step_in,
  output logic [DW-1:0] disp
);
  logic [DW-1:0] cnt, d;

  always_comb begin
    if (row_start) d = first_d;
    else begin
      case (step_in)
        STEP_UP:   d = cnt - 1'b1;
        STEP_DOWN: d = cnt + 1'b1;
        default:   d = cnt;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      disp <= '0;
    end else if (en) begin
      cnt  <= d;
      disp <= d;
    end
  end
endmodule
