// stereo_pkg: types and derived constants shared by the stereo-matching core.
//
// The core is a single strobe-driven pipeline: every register advances only on a
// cycle where the pixel strobe `en` is high, so every latency below is counted in
// accepted pixel pairs, not in clock cycles.
//
// Step encoding (2 bits per path element, as the design stores variation steps
// rather than whole disparities): 00 = same disparity as the previous column,
// 01 = +1, 11 = -1. The concrete bit patterns are this design's choice.
package stereo_pkg;

  typedef enum logic [1:0] {
    STEP_ZERO = 2'b00,
    STEP_UP   = 2'b01,   // P(x,z) = z + 1
    STEP_DOWN = 2'b11    // P(x,z) = z - 1
  } step_t;

  // Signed value of a step: -1, 0 or +1.
  function automatic int step_value(step_t s);
    case (s)
      STEP_UP:   return 1;
      STEP_DOWN: return -1;
      default:   return 0;
    endcase
  endfunction

  // Width of an aggregated Hamming cost: up to WH*WH*WC*WC differing bits.
  function automatic int cost_width(int wc, int wh);
    return $clog2(wh * wh * wc * wc + 1);
  endfunction

  // Width of an energy accumulator over one row: the straight path bounds the
  // minimum energy by NC*Cmax, and one lambda may be added on top before the min.
  function automatic int energy_width(int nc, int wc, int wh, int lambda);
    return $clog2(nc * wh * wh * wc * wc + lambda + 1);
  endfunction

  // Width of a disparity value 0..R-1.
  function automatic int disp_width(int r);
    return (r > 1) ? $clog2(r) : 1;
  endfunction

  // Hamming-distance latency: one XOR/popcount stage plus one stage per level of
  // the two-operand adder tree.
  function automatic int hd_latency(int wh);
    return 1 + $clog2(wh * wh);
  endfunction

  // Strobes from presenting left pixel u to the cost vector of the left-referenced
  // flow for centre pixel u appearing at the dynamic-programming input:
  // pixel register (1) + census register (1) + census buffer entry (1)
  // + centring of both windows + Hamming pipeline.
  function automatic int mc_latency(int nc, int wc, int wh);
    return 3 + ((wc - 1) / 2 + (wh - 1) / 2) * (nc + 1) + hd_latency(wh);
  endfunction

  // Dynamic programming: one row to accumulate, one row to back-track, one row to
  // forward-track, plus the output register.
  function automatic int dp_latency(int nc);
    return 2 * nc + 1;
  endfunction

  // Strobes from presenting right pixel u to its checked result at the core output.
  // The right-referenced flow trails the left one by R-1 pixels, and the
  // consistency check adds an input and an output register.
  function automatic int total_latency(int nc, int wc, int wh, int r);
    return mc_latency(nc, wc, wh) + dp_latency(nc) + r + 1;
  endfunction

endpackage
