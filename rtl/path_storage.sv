// path_storage: the Disparity Path Storage block. R piston stack lines, one per
// disparity, each holding the 2-bit variation steps of one candidate path for a
// whole row (NC entries). Storing steps instead of disparities is what keeps the
// storage small.
//
// During row y the steps of row y are pushed while the steps of row y-1 leave in
// reverse column order (column NC-1 first) for the back-tracker. The shift
// direction of all lines flips at the first column of every row (row_start).
//
// Timing: pop is combinational for the current strobe; push is taken on en=1.
module path_storage
  import stereo_pkg::*;
#(
  parameter int NC = 640,
  parameter int R  = 30
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  logic  row_start,
  input  step_t push [R],
  output step_t pop  [R]
);
  logic dir_q, dir;

  assign dir = row_start ? ~dir_q : dir_q;

  always_ff @(posedge clk) begin
    if (rst)     dir_q <= 1'b0;
    else if (en) dir_q <= dir;
  end

  for (genvar z = 0; z < R; z++) begin : g_line
    logic [1:0] q;
    piston_stack #(.DEPTH(NC), .W(2)) u_line (
      .clk, .rst, .en, .dir, .push_d(push[z]), .pop_q(q));
    assign pop[z] = step_t'(q);
  end
endmodule
