// tb_stereo_r50: end-to-end test of the stereo core in its second configuration, disparity range 50, on reduced 96x6 images.
//
// A synthetic stereo pair is generated on the fly: the left image is a
// pseudo-random texture, the right image is the left one shifted by a known
// disparity field (a background plane and a nearer rectangle), with a little
// noise, and a flat strip at the start of each row. The testbench computes the whole algorithm independently, straight from
// the equations (census bits, Hamming aggregation, energy recursion with the same
// tie rule, back-tracking, cross check), on the raster stream exactly as the core
// sees it, and compares every output: disparity, valid flag and pixel coordinates.
// It also checks the pipeline latency and counts the mechanisms it exercised:
// input stalls, upward and downward path steps, accepted and rejected pixels,
// row wrap-around and frame wrap-around.
module tb_stereo_r50;
  import stereo_pkg::*;

  localparam int NC     = 96;
  localparam int NR     = 6;
  localparam int WC     = 3;
  localparam int WH     = 5;
  localparam int R      = 50;
  localparam int PW     = 8;
  localparam int LAMBDA = 7;
  localparam int DW     = disp_width(R);
  localparam int XW     = $clog2(NC);
  localparam int YW     = $clog2(NR);
  localparam int C      = (WC - 1) / 2;
  localparam int H      = (WH - 1) / 2;
  localparam int TOTAL  = total_latency(NC, WC, WH, R);
  localparam int NOUT   = NC * NR + 2 * NC;                       // outputs checked
  localparam int TFEED  = NOUT + TOTAL + 2;             // strobes fed
  localparam int ROWS_R = (NOUT + NC - 1) / NC;         // right rows modelled
  localparam int ROWS_L = ROWS_R + 1;                   // left rows modelled
  localparam int STALL_PCT = 5;

  logic          clk = 0;
  logic          rst = 1;
  logic          pix_valid = 0;
  logic [PW-1:0] pix_l = 0, pix_r = 0;
  logic          out_valid, out_ok;
  logic [DW-1:0] out_disp;
  logic [XW-1:0] out_x;
  logic [YW-1:0] out_y;

  stereo_top #(.NC(NC), .NR(NR), .WC(WC), .WH(WH), .R(R), .PW(PW), .LAMBDA(LAMBDA)) u_dut (
    .clk, .rst, .pix_valid, .pix_l, .pix_r,
    .out_valid, .out_disp, .out_ok, .out_x, .out_y);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- stimulus ----------------
  byte unsigned pl [TFEED];
  byte unsigned pr [TFEED];

  function automatic int true_disp(int x, int y);
    if (x >= NC / 3 && x < (2 * NC) / 3 && y >= NR / 4 && y < (3 * NR) / 4) return (R * 2) / 3;
    return R / 4;
  endfunction

  function automatic int texture(int f, int x, int y);
    int unsigned h;
    h = (x * 73856093) ^ (y * 19349663) ^ (f * 83492791);
    h = h ^ (h >> 13); h = h * 32'h5bd1e995; h = h ^ (h >> 15);
    return int'(h & 255);
  endfunction

  initial begin
    for (int t = 0; t < TFEED; t++) begin
      int f, x, y, d;
      f = t / (NC * NR); x = t % NC; y = (t / NC) % NR;
      d = true_disp(x, y);
      pl[t] = 8'(texture(f, x, y));
      // right(x) = left(x + d): a left pixel at x is seen at x - d on the right
      pr[t] = (x + d < NC) ? 8'(texture(f, x + d, y) + ($urandom % 3) - 1) : 8'($urandom);
      // a textureless strip at the start of every row, where only the path
      // optimisation (and where each row begins) decides the disparity
      if (x < NC / 8 + 2) pl[t] = 8'd128;
      if (x < NC / 8) pr[t] = 8'd128;
    end
  end

  // ---------------- reference model ----------------
  function automatic int px(bit left, int t);
    if (t < 0 || t >= TFEED) return 0;
    return left ? int'(pl[t]) : int'(pr[t]);
  endfunction

  function automatic int census(bit left, int u);
    int v = 0, cen;
    cen = px(left, u);
    for (int j = 0; j < WC; j++)
      for (int i = 0; i < WC; i++)
        if (px(left, u + (j - C) * NC + (i - C)) < cen) v |= (1 << (j * WC + i));
    return v;
  endfunction

  int cvl [int];
  int cvr [int];
  function automatic int cv(bit left, int u);
    if (left) begin
      if (!cvl.exists(u)) cvl[u] = census(1, u);
      return cvl[u];
    end
    if (!cvr.exists(u)) cvr[u] = census(0, u);
    return cvr[u];
  endfunction

  // ref is the reference image, cand the other, the candidate window centred at uc
  function automatic int hamming(bit ref_left, int ur, int uc);
    int s = 0;
    for (int j = 0; j < WH; j++)
      for (int i = 0; i < WH; i++)
        s += $countones(cv(ref_left, ur + (j - H) * NC + (i - H)) ^
                        cv(!ref_left, uc + (j - H) * NC + (i - H)));
    return s;
  endfunction

  int dl_m [ROWS_L * NC];
  int dr_m [ROWS_R * NC];
  int steps_up = 0, steps_down = 0;

  // Scan-line optimisation of one row; left: candidates at u-z, right: at u+z.
  task automatic dp_row(bit left, int y, ref int d_out [NC]);
    longint e [R], en [R];
    int     s [NC][R];
    for (int x = 0; x < NC; x++) begin
      int u = y * NC + x;
      for (int z = 0; z < R; z++) begin
        int c;
        c = left ? hamming(1, u, u - z) : hamming(0, u, u + z);
        if (x == 0) begin
          en[z] = c; s[x][z] = 0;
        end else begin
          longint best; int st;
          best = e[z]; st = 0;
          if (z > 0 && e[z-1] + LAMBDA < best) begin best = e[z-1] + LAMBDA; st = -1; end
          if (z < R - 1 && e[z+1] + LAMBDA < best) begin best = e[z+1] + LAMBDA; st = 1; end
          en[z] = best + c; s[x][z] = st;
        end
      end
      e = en;
    end
    begin
      int d = 0;
      for (int z = 1; z < R; z++) if (e[z] < e[d]) d = z;
      for (int x = NC - 1; x >= 0; x--) begin
        d_out[x] = d;
        d = d + s[x][d];
      end
    end
  endtask

  initial begin
    int row [NC];
    #1;
    for (int y = 0; y < ROWS_L; y++) begin
      dp_row(1, y, row);
      for (int x = 0; x < NC; x++) dl_m[y * NC + x] = row[x];
    end
    for (int y = 0; y < ROWS_R; y++) begin
      dp_row(0, y, row);
      for (int x = 0; x < NC; x++) begin
        dr_m[y * NC + x] = row[x];
        if (x > 0 && row[x] > row[x-1]) steps_up++;
        if (x > 0 && row[x] < row[x-1]) steps_down++;
      end
    end
  end

  // ---------------- drive ----------------
  int fed = 0, stalls = 0;
  int first_out_strobes = -1;
  bit model_ready = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    while (fed < TFEED) begin
      if ($urandom % 100 < STALL_PCT) begin
        pix_valid <= 0; stalls++;
      end else begin
        pix_valid <= 1; pix_l <= pl[fed]; pix_r <= pr[fed]; fed++;
      end
      @(posedge clk);
    end
    pix_valid <= 0;
    repeat (4) @(posedge clk);
    finish_test();
  end

  // ---------------- compare ----------------
  int n_out = 0, n_ok = 0, n_rej = 0, row_wraps = 0, frame_wraps = 0;
  int strobes_seen = 0;
  always @(posedge clk) begin
    if (!rst && pix_valid) strobes_seen <= strobes_seen + 1;
    if (!rst && out_valid) begin
      if (first_out_strobes < 0) first_out_strobes = strobes_seen;
      if (n_out < NOUT) begin
        int v, expd; bit expok;
        v = n_out;
        expd  = dr_m[v];
        expok = (v + expd < ROWS_L * NC) && (dl_m[v + expd] == expd);
        checks++;
        if (int'(out_disp) != expd || out_ok != expok ||
            int'(out_x) != v % NC || int'(out_y) != (v / NC) % NR) begin
          failures++;
          if (failures < 10)
            $display("mismatch v=%0d (x=%0d y=%0d): disp %0d exp %0d ok %0d exp %0d xy %0d,%0d",
                     v, v % NC, (v / NC) % NR, out_disp, expd, out_ok, expok, out_x, out_y);
        end
        if (out_ok) n_ok++; else n_rej++;
        if (v > 0 && out_x == 0) row_wraps++;
        if (v > 0 && out_x == 0 && out_y == 0) frame_wraps++;
      end
      n_out++;
    end
  end

  task automatic count_mech(string what, int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("  mechanism never exercised: %s", what);
    end
  endtask

  task automatic finish_test();
    $display("outputs %0d (checked %0d), strobes fed %0d", n_out, NOUT, fed);
    checks++;
    if (n_out < NOUT) begin failures++; $display("too few outputs"); end
    checks++;
    if (first_out_strobes != TOTAL) begin
      failures++;
      $display("latency: first output after %0d strobes, expected %0d", first_out_strobes, TOTAL);
    end
    count_mech("input stalls", stalls);
    count_mech("path steps up", steps_up);
    count_mech("path steps down", steps_down);
    count_mech("accepted by cross check", n_ok);
    count_mech("rejected by cross check", n_rej);
    count_mech("row wrap-arounds", row_wraps);
    count_mech("frame wrap-arounds", frame_wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #(64'd10 * (64'd4 * TFEED + 1000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
