// census_buffer: shift register of NC*(WH-1)+R+WH-1 census vectors that presents
// R aggregation windows of WH x WH census vectors each, at horizontal offsets
// 0..R-1 pixels.
//
// Register 0 holds the newest census vector. Window o (offset o pixels into the
// past) row j column i is tap o + (WH-1-j)*NC + (WH-1-i); its centre is therefore
// o + H*NC + H vectors older than the newest one, H = (WH-1)/2. The matching-cost
// module uses window 0 of the left buffer and window R-1 of the right buffer as
// the two reference windows, and the other windows as candidates. The register
// count is the one the design specifies; the tap numbering is this design's own.
//
// Timing: shifts on en=1; outputs are combinational taps. Reset clears to 0.
module census_buffer #(
  parameter int NC = 640,
  parameter int WH = 5,
  parameter int R  = 30,
  parameter int N  = 9     // bits per census vector (WC*WC)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [N-1:0] cv_in,
  output logic [N-1:0] cwin [R][WH][WH]
);
  localparam int LEN = NC * (WH - 1) + R + WH - 1;

  logic [N-1:0] sr [LEN];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LEN; i++) sr[i] <= '0;
    end else if (en) begin
      sr[0] <= cv_in;
      for (int i = 1; i < LEN; i++) sr[i] <= sr[i-1];
    end
  end

  always_comb begin
    for (int o = 0; o < R; o++)
      for (int j = 0; j < WH; j++)
        for (int i = 0; i < WH; i++)
          cwin[o][j][i] = sr[o + (WH-1-j)*NC + (WH-1-i)];
  end
endmodule
