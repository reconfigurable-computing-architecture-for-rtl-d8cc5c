// pixel_window_buffer: line buffer that turns a raster pixel stream into a
// WC x WC window, one new window per accepted pixel.
//
// It is a single shift register of NC*(WC-1)+WC pixels (WC-1 full rows plus WC
// pixels), as the matching-cost front end of the design prescribes. Register 0
// holds the newest pixel; window element win[j][i] (row j from the top, column i
// from the left) is tap (WC-1-j)*NC + (WC-1-i). Windows are not clipped at the
// image border: near the left and right edges they wrap into the neighbouring row,
// which matches a pure shift-register implementation.
//
// Timing: the pixel on pix_in is taken on a clock edge where en=1; win reflects it
// from the next cycle. Reset clears the register to 0 (this design's choice, so that
// the start of the stream behaves as if preceded by black pixels).
module pixel_window_buffer #(
  parameter int NC = 640,  // pixels per image row
  parameter int WC = 3,    // census window size
  parameter int PW = 8     // bits per pixel
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic [PW-1:0] pix_in,
  output logic [PW-1:0] win [WC][WC]
);
  localparam int LEN = NC * (WC - 1) + WC;

  logic [PW-1:0] sr [LEN];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LEN; i++) sr[i] <= '0;
    end else if (en) begin
      sr[0] <= pix_in;
      for (int i = 1; i < LEN; i++) sr[i] <= sr[i-1];
    end
  end

  always_comb begin
    for (int j = 0; j < WC; j++)
      for (int i = 0; i < WC; i++)
        win[j][i] = sr[(WC-1-j)*NC + (WC-1-i)];
  end
endmodule
