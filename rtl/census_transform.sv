// census_transform: WC*WC parallel comparators producing the census vector of a
// pixel window (one bit per window element).
//
// Bit k = j*WC + i is the sign bit of win[j][i] - centre, i.e. 1 when that pixel
// is darker than the centre pixel, 0 otherwise; the centre bit is therefore always
// 0. The bit order and "1 = smaller" polarity are this design's choice; the
// comparator-per-element structure follows the design description.
//
// Timing: one register stage, advanced when en=1; cleared by reset.
module census_transform #(
  parameter int WC = 3,
  parameter int PW = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [PW-1:0]    win [WC][WC],
  output logic [WC*WC-1:0] cv
);
  localparam int C = (WC - 1) / 2;

  logic [WC*WC-1:0] cv_d;

  always_comb begin
    for (int j = 0; j < WC; j++)
      for (int i = 0; i < WC; i++) begin
        // sign bit of the (PW+1)-bit difference
        logic [PW:0] diff;
        diff = {1'b0, win[j][i]} - {1'b0, win[C][C]};
        cv_d[j*WC + i] = diff[PW];
      end
  end

  always_ff @(posedge clk) begin
    if (rst)     cv <= '0;
    else if (en) cv <= cv_d;
  end
endmodule
