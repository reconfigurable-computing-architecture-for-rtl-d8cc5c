// stereo_top: real-time stereo disparity core. Takes a rectified left/right pixel
// pair per strobe and returns, per strobe, the disparity of one right-image pixel
// with a flag telling whether it passed the left/right consistency check.
//
// Data flow: matching_cost (census transform + Hamming aggregation over the whole
// disparity range, for a left- and a right-referenced flow) -> two
// dynamic_programming instances (scan-line optimisation, one per flow) ->
// consistency_check. All stages advance together on pix_valid, so the core takes
// and delivers one pixel pair per clock when pix_valid is held high.
//
// Interface: the pixel stream is raster order, frames back to back, starting at
// pixel (0,0) after reset; there is no frame or line marker. Because the
// dynamic-programming stage works a full row behind twice, the results of the last
// rows of a frame leave while the next frame (or any filler) is being fed.
// out_valid pulses for one clock after each strobe once the pipeline is full
// (total_latency() strobes); out_x/out_y give the right-image pixel of
// out_disp, and out_ok is the consistency flag.
module stereo_top
  import stereo_pkg::*;
#(
  parameter int NC     = 640,  // image width
  parameter int NR     = 480,  // image height
  parameter int WC     = 3,    // census window
  parameter int WH     = 5,    // aggregation (Hamming) window
  parameter int R      = 30,   // disparity range
  parameter int PW     = 8,    // bits per pixel
  parameter int LAMBDA = 7,    // discontinuity penalty
  localparam int DW    = disp_width(R),
  localparam int XW    = $clog2(NC),
  localparam int YW    = $clog2(NR)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          pix_valid,
  input  logic [PW-1:0] pix_l,
  input  logic [PW-1:0] pix_r,
  output logic          out_valid,
  output logic [DW-1:0] out_disp,
  output logic          out_ok,
  output logic [XW-1:0] out_x,
  output logic [YW-1:0] out_y
);
  localparam int CW     = cost_width(WC, WH);
  localparam int EW     = energy_width(NC, WC, WH, LAMBDA);
  localparam int K      = mc_latency(NC, WC, WH);
  localparam int TOTAL  = total_latency(NC, WC, WH, R);
  // Column of the first strobe's cost vector in each flow.
  localparam int COL_L  = ((-K) % NC + NC) % NC;
  localparam int COL_R  = ((-(K + R - 1)) % NC + NC) % NC;
  localparam int WARMW  = $clog2(TOTAL + 1);

  logic          en;
  logic [CW-1:0] cost_l [R];
  logic [CW-1:0] cost_r [R];
  logic [DW-1:0] dl, dr;
  logic          rs_l, rs_r;
  logic [WARMW-1:0] warm;
  logic [XW-1:0] x_cnt;
  logic [YW-1:0] y_cnt;

  assign en = pix_valid;

  matching_cost #(.NC(NC), .WC(WC), .WH(WH), .R(R), .PW(PW), .CW(CW)) u_mc (
    .clk, .rst, .en, .pix_l, .pix_r, .cost_l, .cost_r);

  dynamic_programming #(.NC(NC), .R(R), .CW(CW), .EW(EW), .LAMBDA(LAMBDA),
                        .INIT_COL(COL_L), .DW(DW)) u_dp_l (
    .clk, .rst, .en, .cost(cost_l), .disp(dl), .row_start(rs_l));

  dynamic_programming #(.NC(NC), .R(R), .CW(CW), .EW(EW), .LAMBDA(LAMBDA),
                        .INIT_COL(COL_R), .DW(DW)) u_dp_r (
    .clk, .rst, .en, .cost(cost_r), .disp(dr), .row_start(rs_r));

  consistency_check #(.R(R), .DW(DW)) u_cc (
    .clk, .rst, .en, .dl, .dr, .disp(out_disp), .ok(out_ok));

  // Output bookkeeping: after TOTAL-1 strobes the consistency-check registers
  // hold the result of right pixel (0,0) of frame 0.
  always_ff @(posedge clk) begin
    if (rst) begin
      warm      <= '0;
      x_cnt     <= '0;
      y_cnt     <= '0;
      out_valid <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (en) begin
        if (int'(warm) < TOTAL - 1) begin
          warm <= warm + 1'b1;
        end else begin
          out_valid <= 1'b1;
          out_x     <= x_cnt;
          out_y     <= y_cnt;
          if (int'(x_cnt) == NC - 1) begin
            x_cnt <= '0;
            y_cnt <= (int'(y_cnt) == NR - 1) ? '0 : y_cnt + 1'b1;
          end else begin
            x_cnt <= x_cnt + 1'b1;
          end
        end
      end
    end
  end
endmodule
