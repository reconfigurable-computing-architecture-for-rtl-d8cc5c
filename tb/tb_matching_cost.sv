// tb_matching_cost: random left/right pixel streams (the right one partly a
// shifted copy of the left) with random stalls. The testbench computes census
// vectors and aggregated Hamming costs directly from their definitions on the raster
// stream (pixels before the start count as 0) and checks both cost vectors on
// every strobe once the pipeline is full, which also checks the latency
// mc_latency(): left-referenced cost of centre pixel u, right-referenced cost of
// centre pixel u-(R-1).
module tb_matching_cost;
  import stereo_pkg::*;
  localparam int NC = 12, WC = 3, WH = 5, R = 4, PW = 8, NS = 220;
  localparam int CW = cost_width(WC, WH), K = mc_latency(NC, WC, WH);
  localparam int C = (WC - 1) / 2, H = (WH - 1) / 2;
  logic clk = 0, rst = 1, en = 0;
  logic [PW-1:0] pix_l = 0, pix_r = 0;
  logic [CW-1:0] cost_l [R];
  logic [CW-1:0] cost_r [R];
  int checks = 0, failures = 0, nonzero = 0;
  int pl [NS];
  int pr [NS];

  matching_cost #(.NC(NC), .WC(WC), .WH(WH), .R(R), .PW(PW), .CW(CW)) u_dut (
    .clk, .rst, .en, .pix_l, .pix_r, .cost_l, .cost_r);
  always #5 clk = ~clk;

  function automatic int px(bit left, int t);
    if (t < 0 || t >= NS) return 0;
    return left ? pl[t] : pr[t];
  endfunction

  function automatic int census(bit left, int u);
    int v = 0;
    for (int j = 0; j < WC; j++)
      for (int i = 0; i < WC; i++)
        if (px(left, u + (j - C) * NC + (i - C)) < px(left, u)) v |= (1 << (j * WC + i));
    return v;
  endfunction

  function automatic int cost(bit ref_left, int ur, int uc);
    int s = 0;
    for (int j = 0; j < WH; j++)
      for (int i = 0; i < WH; i++)
        s += $countones(census(ref_left, ur + (j - H) * NC + (i - H)) ^
                        census(!ref_left, uc + (j - H) * NC + (i - H)));
    return s;
  endfunction

  initial begin
    for (int t = 0; t < NS; t++) begin
      pl[t] = $urandom % 256;
      pr[t] = (t >= 2 && $urandom % 4 != 0) ? pl[t - 2] : $urandom % 256;
    end
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < NS; k++) begin
      pix_l = PW'(pl[k]); pix_r = PW'(pr[k]);
      if ($urandom % 4 == 0) begin en = 0; @(posedge clk); #1; end
      en = 1;
      @(posedge clk); #1;
      en = 0;
      // after strobe k the outputs belong to left centre pixel u = k+1-K
      begin
        int u;
        u = k + 1 - K;
        if (u >= 0 && u + H * NC + H + C * NC + C < NS) begin
          for (int z = 0; z < R; z++) begin
            int el, er;
            el = cost(1, u, u - z);
            er = cost(0, u - (R - 1), u - (R - 1) + z);
            checks++;
            if (int'(cost_l[z]) != el || int'(cost_r[z]) != er) begin
              failures++;
              if (failures < 5) $display("u%0d z%0d L %0d exp %0d R %0d exp %0d", u, z, cost_l[z], el, cost_r[z], er);
            end
            if (el != 0) nonzero++;
          end
        end
      end
    end
    checks++;
    if (nonzero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS * 3 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
