// disparity_storage: the Disparity Storage block. A single piston stack line that
// queues the steps of the optimum path as the back-tracker produces them (last
// column first) and hands them to the forward-tracker one row later in column
// order, so the disparities can leave in raster order.
//
// Same direction control as the path storage: the line reverses at every
// row_start. Timing: pop is combinational; push is taken on en=1.
module disparity_storage
  import stereo_pkg::*;
#(
  parameter int NC = 640
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  logic  row_start,
  input  step_t push,
  output step_t pop
);
  logic dir_q, dir;
  logic [1:0] q;

  assign dir = row_start ? ~dir_q : dir_q;

  always_ff @(posedge clk) begin
    if (rst)     dir_q <= 1'b0;
    else if (en) dir_q <= dir;
  end

  piston_stack #(.DEPTH(NC), .W(2)) u_line (
    .clk, .rst, .en, .dir, .push_d(push), .pop_q(q));

  assign pop = step_t'(q);
endmodule
