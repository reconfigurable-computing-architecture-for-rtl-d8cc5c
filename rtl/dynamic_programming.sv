// dynamic_programming: scan-line optimisation of one cost stream. Consumes one
// R-entry cost vector per strobe in raster order and produces one disparity per
// strobe, delayed by dp_latency() = 2*NC+1 strobes.
//
// Three rows are in flight at once, each in a different stage:
//   row y   : the EF block accumulates energies and pushes the step of every
//             candidate path into the path storage;
//   row y-1 : the Min Tree picks the best end disparity of row y-1 (at the first
//             column of row y), and the back-tracker walks that path backwards,
//             popping the path storage and pushing the chosen steps into the
//             disparity storage;
//   row y-2 : the forward-tracker pops those steps in column order and outputs
//             the disparities.
// The column counter starts at INIT_COL after reset so that the instance can be
// aligned with the pipeline in front of it; rows are NC strobes long.
module dynamic_programming
  import stereo_pkg::*;
#(
  parameter int NC       = 640,
  parameter int R        = 30,
  parameter int CW       = 8,
  parameter int EW       = 18,
  parameter int LAMBDA   = 7,
  parameter int INIT_COL = 0,
  parameter int DW       = disp_width(R)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic [CW-1:0] cost [R],
  output logic [DW-1:0] disp,
  output logic          row_start     // first column of a row on the input
);
  localparam int XW = $clog2(NC);

  logic [XW-1:0] col;
  logic          row_end;
  logic [EW-1:0] energy [R];
  step_t         ef_steps [R];
  step_t         ps_pop [R];
  logic [DW-1:0] last_d, first_d, bt_d;
  step_t         bt_step, ds_pop;

  assign row_start = (col == '0);
  assign row_end   = (int'(col) == NC - 1);

  always_ff @(posedge clk) begin
    if (rst)     col <= XW'(INIT_COL);
    else if (en) col <= row_end ? '0 : col + 1'b1;
  end

  ef_block #(.R(R), .CW(CW), .EW(EW), .LAMBDA(LAMBDA)) u_ef (
    .clk, .rst, .en, .first(row_start), .cost, .energy, .steps(ef_steps));

  path_storage #(.NC(NC), .R(R)) u_ps (
    .clk, .rst, .en, .row_start, .push(ef_steps), .pop(ps_pop));

  min_tree #(.R(R), .EW(EW), .DW(DW)) u_mt (
    .energy, .idx(last_d));

  bt_block #(.R(R), .DW(DW)) u_bt (
    .clk, .rst, .en, .row_start, .row_end, .last_d, .steps_in(ps_pop),
    .step_out(bt_step), .d_cur(bt_d), .first_d);

  disparity_storage #(.NC(NC)) u_ds (
    .clk, .rst, .en, .row_start, .push(bt_step), .pop(ds_pop));

  ft_block #(.R(R), .DW(DW)) u_ft (
    .clk, .rst, .en, .row_start, .first_d, .step_in(ds_pop), .disp);

  // The back-tracker must never leave the disparity range.
  assert property (@(posedge clk) disable iff (rst) en |-> int'(bt_d) < R);
endmodule
