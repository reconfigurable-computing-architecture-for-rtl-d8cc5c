// tb_bt_block: builds a random set of R candidate paths for a row (step matrix
// s[x][z], never leaving 0..R-1), then plays the back-tracking row: step vectors
// arrive last column first, last_d is given on the first strobe. Every back-tracked
// disparity, every selected step and the final D(0) are compared with a direct
// walk of D(x-1) = D(x) + s[x][D(x)].
module tb_bt_block;
  import stereo_pkg::*;
  localparam int NC = 12, R = 8, DW = disp_width(R), NROWS = 30;
  logic clk = 0, rst = 1, en = 0, row_start = 0, row_end = 0;
  logic [DW-1:0] last_d = 0;
  step_t steps_in [R];
  step_t step_out;
  logic [DW-1:0] d_cur, first_d;
  int checks = 0, failures = 0, n_up = 0, n_down = 0;
  int s [NC][R];

  bt_block #(.R(R), .DW(DW)) u_dut (
    .clk, .rst, .en, .row_start, .row_end, .last_d, .steps_in, .step_out, .d_cur, .first_d);
  always #5 clk = ~clk;

  function automatic step_t enc(int v);
    return (v > 0) ? STEP_UP : (v < 0) ? STEP_DOWN : STEP_ZERO;
  endfunction

  initial begin
    for (int z = 0; z < R; z++) steps_in[z] = STEP_ZERO;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int y = 0; y < NROWS; y++) begin
      int d, ld;
      for (int x = 0; x < NC; x++)
        for (int z = 0; z < R; z++) begin
          int v;
          v = int'($urandom % 3) - 1;
          if (z + v < 0 || z + v >= R || x == 0) v = 0;
          s[x][z] = v;
        end
      ld = $urandom % R;
      d = ld;
      for (int j = 0; j < NC; j++) begin
        int x;
        x = NC - 1 - j;
        for (int z = 0; z < R; z++) steps_in[z] = enc(s[x][z]);
        row_start = (j == 0);
        row_end   = (j == NC - 1);
        last_d    = (j == 0) ? DW'(ld) : DW'($urandom % R);
        en = ($urandom % 4) != 0;
        #1;
        checks++;
        if (int'(d_cur) != d || step_value(step_out) != s[x][d]) begin
          failures++;
          if (failures < 5) $display("y%0d j%0d d_cur %0d exp %0d", y, j, d_cur, d);
        end
        if (s[x][d] > 0) n_up++;
        if (s[x][d] < 0) n_down++;
        @(posedge clk); #1;
        if (!en) begin en = 1; @(posedge clk); #1; end
        en = 0;
        d = d + s[x][d];
      end
      checks++;
      if (int'(first_d) != d) begin failures++; $display("first_d %0d exp %0d", first_d, d); end
    end
    checks++;
    if (n_up == 0 || n_down == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NC * NROWS * 4 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
