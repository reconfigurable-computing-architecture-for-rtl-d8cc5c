// matching_cost: the Matching Cost Function module. Census transform of both
// images followed by Hamming-distance aggregation for the whole disparity range,
// for a left-referenced and a right-referenced flow in parallel.
//
// Each image has its own pixel window buffer, census transform and census buffer.
// Per strobe the module delivers two cost vectors of R entries:
//   cost_l[z] = C_L(u, z): left window centred at pixel u against the right window
//               centred at u - z (left reference, candidates to the left);
//   cost_r[z] = C_R(u-(R-1), z): right window centred at u-(R-1) against the left
//               window centred at u-(R-1)+z (right reference).
// The right-referenced flow therefore trails the left one by R-1 pixels. That
// offset is this design's choice: it lets both flows share census buffers of the
// length the design specifies, and it lines up the two disparity streams for the
// consistency check without extra delay. 2*R Hamming units run in parallel.
//
// Timing: cost_l for left centre pixel u appears mc_latency() strobes after pixel u
// was presented (stereo_pkg). Everything advances on en=1.
module matching_cost
  import stereo_pkg::*;
#(
  parameter int NC = 640,
  parameter int WC = 3,
  parameter int WH = 5,
  parameter int R  = 30,
  parameter int PW = 8,
  parameter int CW = cost_width(WC, WH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic [PW-1:0] pix_l,
  input  logic [PW-1:0] pix_r,
  output logic [CW-1:0] cost_l [R],
  output logic [CW-1:0] cost_r [R]
);
  localparam int N = WC * WC;

  logic [PW-1:0] win_l [WC][WC];
  logic [PW-1:0] win_r [WC][WC];
  logic [N-1:0]  cv_l, cv_r;
  logic [N-1:0]  cw_l [R][WH][WH];
  logic [N-1:0]  cw_r [R][WH][WH];

  pixel_window_buffer #(.NC(NC), .WC(WC), .PW(PW)) u_pwb_l (
    .clk, .rst, .en, .pix_in(pix_l), .win(win_l));
  pixel_window_buffer #(.NC(NC), .WC(WC), .PW(PW)) u_pwb_r (
    .clk, .rst, .en, .pix_in(pix_r), .win(win_r));

  census_transform #(.WC(WC), .PW(PW)) u_ct_l (.clk, .rst, .en, .win(win_l), .cv(cv_l));
  census_transform #(.WC(WC), .PW(PW)) u_ct_r (.clk, .rst, .en, .win(win_r), .cv(cv_r));

  census_buffer #(.NC(NC), .WH(WH), .R(R), .N(N)) u_cb_l (
    .clk, .rst, .en, .cv_in(cv_l), .cwin(cw_l));
  census_buffer #(.NC(NC), .WH(WH), .R(R), .N(N)) u_cb_r (
    .clk, .rst, .en, .cv_in(cv_r), .cwin(cw_r));

  for (genvar z = 0; z < R; z++) begin : g_hd
    hamming_distance #(.WH(WH), .N(N), .CW(CW)) u_hd_l (
      .clk, .rst, .en, .ref_w(cw_l[0]), .cand_w(cw_r[z]), .hd_out(cost_l[z]));
    hamming_distance #(.WH(WH), .N(N), .CW(CW)) u_hd_r (
      .clk, .rst, .en, .ref_w(cw_r[R-1]), .cand_w(cw_l[R-1-z]), .hd_out(cost_r[z]));
  end
endmodule
