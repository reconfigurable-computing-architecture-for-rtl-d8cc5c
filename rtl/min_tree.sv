// min_tree: the Min Tree block. Returns the index of the smallest of R energies,
// i.e. the last disparity of the optimum path of a row.
//
// A binary tree of compare-select nodes, clog2(R) levels deep; a node keeps its
// left (lower-index) input on a tie, so the lowest minimising disparity wins.
// The tree is purely combinational (this design's choice: the back-tracker loads
// its result on the first column of the next row).
module min_tree #(
  parameter int R  = 30,
  parameter int EW = 18,
  parameter int DW = (R > 1) ? $clog2(R) : 1
) (
  input  logic [EW-1:0] energy [R],
  output logic [DW-1:0] idx
);
  localparam int LEVELS = $clog2(R);

  for (genvar l = 0; l <= LEVELS; l++) begin : lvl
    localparam int NODES = (R + (1 << l) - 1) >> l;
    logic [EW-1:0] v [NODES];
    logic [DW-1:0] i [NODES];
    if (l == 0) begin : g_leaf
      for (genvar n = 0; n < NODES; n++) begin : g_n
        assign v[n] = energy[n];
        assign i[n] = DW'(n);
      end
    end else begin : g_node
      localparam int PREV = (R + (1 << (l - 1)) - 1) >> (l - 1);
      for (genvar n = 0; n < NODES; n++) begin : g_n
        if (2 * n + 1 < PREV) begin : g_cmp
          wire take_right = lvl[l-1].v[2*n+1] < lvl[l-1].v[2*n];
          assign v[n] = take_right ? lvl[l-1].v[2*n+1] : lvl[l-1].v[2*n];
          assign i[n] = take_right ? lvl[l-1].i[2*n+1] : lvl[l-1].i[2*n];
        end else begin : g_pass
          assign v[n] = lvl[l-1].v[2*n];
          assign i[n] = lvl[l-1].i[2*n];
        end
      end
    end
  end

  assign idx = lvl[LEVELS].i[0];
endmodule
