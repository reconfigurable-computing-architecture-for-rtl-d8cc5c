// hamming_distance: aggregated Hamming distance between a reference window and a
// candidate window of census vectors.
//
// Structure, as in the design description: a bank of XOR gates followed by a
// pipelined adder tree. The first tree level counts the single-bit XOR results of
// one census vector (a multi-operand adder of N one-bit inputs); every further
// level adds pairs of partial sums, its precision one bit wider than the level
// below. An odd partial sum at the end of a level is passed up unchanged.
//
// Timing: LAT = 1 + clog2(WH*WH) register stages, all advanced on en=1. The
// output during a strobe is the distance of the windows presented LAT strobes
// earlier. Reset clears the pipeline.
module hamming_distance #(
  parameter int WH = 5,
  parameter int N  = 9,
  parameter int CW = $clog2(WH * WH * N + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic [N-1:0]  ref_w  [WH][WH],
  input  logic [N-1:0]  cand_w [WH][WH],
  output logic [CW-1:0] hd_out
);
  localparam int M      = WH * WH;
  localparam int LEVELS = $clog2(M);
  localparam int W0     = $clog2(N + 1);

  for (genvar l = 0; l <= LEVELS; l++) begin : lvl
    localparam int NODES = (M + (1 << l) - 1) >> l;
    localparam int W     = W0 + l;
    logic [W-1:0] s [NODES];

    if (l == 0) begin : g_pop
      always_ff @(posedge clk) begin
        if (rst) begin
          for (int m = 0; m < NODES; m++) s[m] <= '0;
        end else if (en) begin
          for (int m = 0; m < NODES; m++) begin
            logic [N-1:0] x;
            logic [W-1:0] cnt;
            x   = ref_w[m / WH][m % WH] ^ cand_w[m / WH][m % WH];
            cnt = '0;
            for (int b = 0; b < N; b++) cnt = cnt + W'(x[b]);
            s[m] <= cnt;
          end
        end
      end
    end else begin : g_add
      localparam int PREV = (M + (1 << (l - 1)) - 1) >> (l - 1);
      always_ff @(posedge clk) begin
        if (rst) begin
          for (int n = 0; n < NODES; n++) s[n] <= '0;
        end else if (en) begin
          for (int n = 0; n < NODES; n++) begin
            if (2 * n + 1 < PREV) s[n] <= W'(lvl[l-1].s[2*n]) + W'(lvl[l-1].s[2*n+1]);
            else                  s[n] <= W'(lvl[l-1].s[2*n]);
          end
        end
      end
    end
  end

  localparam int WTOP = W0 + LEVELS;
  if (WTOP >= CW) begin : g_out_trunc
    assign hd_out = lvl[LEVELS].s[0][CW-1:0];
  end else begin : g_out_ext
    assign hd_out = CW'(lvl[LEVELS].s[0]);
  end
endmodule
