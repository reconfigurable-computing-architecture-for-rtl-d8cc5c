// ef_block: the Energy Function block of the dynamic-programming module, a bank of
// R accumulators, one per disparity z.
//
// Per column x of a row: E(x,z) = C(x,z) + min{E(x-1,z-1)+LAMBDA, E(x-1,z),
// E(x-1,z+1)+LAMBDA}; at the first column of a row E(0,z) = C(0,z). The Min
// block of each accumulator also reports which neighbour won as a 2-bit step:
// STEP_DOWN when z-1 won, STEP_ZERO for z, STEP_UP for z+1; the first
// column reports STEP_ZERO. Ties prefer z, then z-1, then z+1 (this design's
// choice). Disparities outside 0..R-1 do not take part.
//
// The recurrence uses the accumulated energies of the previous column, as the
// accumulator structure of the design implies, although one written form of the
// recursion names the previous column's costs instead.
// Energies are not normalised; the width EW is sized for a whole row.
//
// Timing: steps is combinational from cost and the current energies (the value
// for the column on the input); energy registers update on en=1.
module ef_block
  import stereo_pkg::*;
#(
  parameter int R      = 30,
  parameter int CW     = 8,
  parameter int EW     = 18,
  parameter int LAMBDA = 7
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic          first,          // column 0 of a row
  input  logic [CW-1:0] cost   [R],
  output logic [EW-1:0] energy [R],     // E of the last accepted column
  output step_t         steps  [R]      // steps of the column on the input
);
  logic [EW-1:0] e_next [R];

  always_comb begin
    for (int z = 0; z < R; z++) begin
      logic [EW-1:0] best;
      step_t         st;
      best = energy[z];
      st   = STEP_ZERO;
      if (z > 0 && (energy[z-1] + EW'(LAMBDA)) < best) begin
        best = energy[z-1] + EW'(LAMBDA);
        st   = STEP_DOWN;
      end
      if (z < R - 1 && (energy[z+1] + EW'(LAMBDA)) < best) begin
        best = energy[z+1] + EW'(LAMBDA);
        st   = STEP_UP;
      end
      if (first) begin
        e_next[z] = EW'(cost[z]);
        steps[z]  = STEP_ZERO;
      end else begin
        e_next[z] = best + EW'(cost[z]);
        steps[z]  = st;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int z = 0; z < R; z++) energy[z] <= '0;
    end else if (en) begin
      energy <= e_next;
    end
  end
endmodule
