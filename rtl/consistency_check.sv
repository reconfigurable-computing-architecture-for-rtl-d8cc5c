// consistency_check: left/right cross check. A right-referenced
// disparity Dr(x) is accepted when the left-referenced disparity at the matched
// position agrees: Dr(x) == Dl(x + Dr(x)).
//
// The left disparities pass through R registers that shift left on every strobe
// (newest at index R-1). Because the right-referenced stream trails the left one by
// R-1 pixels, register i holds Dl(x+i) when Dr(x) sits in its own input register,
// so a multiplexer indexed by Dr(x) selects the partner and an XNOR bank compares
// the two. Index positions are taken along the raster stream, so matches near the
// right image border may reach into the next row (this design's choice: no border
// special case is described).
//
// Timing: dl/dr are taken on en=1; disp/ok are registered, two strobes after the
// inputs of the compared pair. disp carries Dr(x); ok is the active-high valid flag.
module consistency_check
  import stereo_pkg::*;
#(
  parameter int R  = 30,
  parameter int DW = disp_width(R)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic [DW-1:0] dl,
  input  logic [DW-1:0] dr,
  output logic [DW-1:0] disp,
  output logic          ok
);
  logic [DW-1:0] lbuf [R];
  logic [DW-1:0] dr_q;
  logic [DW-1:0] sel;
  logic          match;

  assign sel   = (int'(dr_q) < R) ? lbuf[dr_q] : ~dr_q;
  assign match = &(sel ~^ dr_q);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < R; i++) lbuf[i] <= '0;
      dr_q <= '0;
      disp <= '0;
      ok   <= 1'b0;
    end else if (en) begin
      for (int i = 0; i < R - 1; i++) lbuf[i] <= lbuf[i+1];
      lbuf[R-1] <= dl;
      dr_q <= dr;
      disp <= dr_q;
      ok   <= match;
    end
  end
endmodule
