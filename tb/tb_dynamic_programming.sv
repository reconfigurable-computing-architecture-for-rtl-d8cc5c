// tb_dynamic_programming: a cost stream with a hidden disparity profile (a low
// cost valley that moves up and down along each row, plus noise) is fed with
// random stalls. The testbench runs the scan-line optimisation itself (energy
// recursion with the same tie rule, arg-min of the last column, back-tracking)
// and checks every output disparity, which must appear 2*NC+1 strobes after its
// cost vector. Upward and downward path steps are counted and must both occur.
module tb_dynamic_programming;
  import stereo_pkg::*;
  localparam int NC = 14, R = 6, CW = 8, EW = 14, LAMBDA = 7, NROWS = 16;
  localparam int DW = disp_width(R), LAT = dp_latency(NC);
  logic clk = 0, rst = 1, en = 0;
  logic [CW-1:0] cost [R];
  logic [DW-1:0] disp;
  logic row_start;
  int checks = 0, failures = 0, n_up = 0, n_down = 0;
  int c_m [NROWS][NC][R];
  int d_m [NROWS][NC];

  dynamic_programming #(.NC(NC), .R(R), .CW(CW), .EW(EW), .LAMBDA(LAMBDA), .INIT_COL(0), .DW(DW))
    u_dut (.clk, .rst, .en, .cost, .disp, .row_start);
  always #5 clk = ~clk;

  initial begin
    for (int y = 0; y < NROWS; y++) begin
      int e [R], en_m [R], s [NC][R], d, valley;
      valley = $urandom % R;
      for (int x = 0; x < NC; x++) begin
        if ($urandom % 3 == 0) valley = (valley + ($urandom % 2 ? 1 : R - 1)) % R;
        for (int z = 0; z < R; z++)
          c_m[y][x][z] = (z == valley) ? $urandom % 6 : 10 + $urandom % 30;
      end
      for (int x = 0; x < NC; x++) begin
        for (int z = 0; z < R; z++) begin
          int best, st;
          best = e[z]; st = 0;
          if (z > 0 && e[z-1] + LAMBDA < best) begin best = e[z-1] + LAMBDA; st = -1; end
          if (z < R - 1 && e[z+1] + LAMBDA < best) begin best = e[z+1] + LAMBDA; st = 1; end
          if (x == 0) begin en_m[z] = c_m[y][x][z]; s[x][z] = 0; end
          else begin en_m[z] = best + c_m[y][x][z]; s[x][z] = st; end
        end
        e = en_m;
      end
      d = 0;
      for (int z = 1; z < R; z++) if (e[z] < e[d]) d = z;
      for (int x = NC - 1; x >= 0; x--) begin
        d_m[y][x] = d;
        d = d + s[x][d];
      end
      for (int x = 1; x < NC; x++) begin
        if (d_m[y][x] > d_m[y][x-1]) n_up++;
        if (d_m[y][x] < d_m[y][x-1]) n_down++;
      end
    end
    for (int z = 0; z < R; z++) cost[z] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < NROWS * NC; k++) begin
      int y, x;
      y = k / NC; x = k % NC;
      for (int z = 0; z < R; z++) cost[z] = CW'(c_m[y][x][z]);
      if ($urandom % 4 == 0) begin en = 0; @(posedge clk); #1; end
      en = 1;
      #1;
      checks++;
      if (row_start != (x == 0)) failures++;
      @(posedge clk); #1;
      en = 0;
      // after strobe k the output holds the disparity of cost index k+1-LAT
      if (k + 1 - LAT >= 0) begin
        int i;
        i = k + 1 - LAT;
        checks++;
        if (int'(disp) != d_m[i / NC][i % NC]) begin
          failures++;
          if (failures < 5) $display("row %0d col %0d disp %0d exp %0d", i / NC, i % NC, disp, d_m[i / NC][i % NC]);
        end
      end
    end
    checks++;
    if (n_up == 0 || n_down == 0) begin failures++; $display("path steps not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NC * NROWS * 3 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
