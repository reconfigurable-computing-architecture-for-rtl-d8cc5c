// tb_ft_block: random disparity rows are turned into (D(0), steps) the way the
// back-tracker leaves them, i.e. step t(x) = D(x-1) - D(x); the forward-tracker
// must rebuild every D(x) and present it one strobe later.
module tb_ft_block;
  import stereo_pkg::*;
  localparam int NC = 12, R = 8, DW = disp_width(R), NROWS = 30;
  logic clk = 0, rst = 1, en = 0, row_start = 0;
  logic [DW-1:0] first_d = 0;
  step_t step_in = STEP_ZERO;
  logic [DW-1:0] disp;
  int checks = 0, failures = 0;
  int dd [NC];

  ft_block #(.R(R), .DW(DW)) u_dut (.clk, .rst, .en, .row_start, .first_d, .step_in, .disp);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int y = 0; y < NROWS; y++) begin
      dd[0] = $urandom % R;
      for (int x = 1; x < NC; x++) begin
        int v;
        v = int'($urandom % 3) - 1;
        if (dd[x-1] + v < 0 || dd[x-1] + v >= R) v = 0;
        dd[x] = dd[x-1] + v;
      end
      for (int x = 0; x < NC; x++) begin
        int t;
        t = (x == 0) ? 0 : dd[x-1] - dd[x];
        step_in   = (t > 0) ? STEP_UP : (t < 0) ? STEP_DOWN : STEP_ZERO;
        row_start = (x == 0);
        first_d   = (x == 0) ? DW'(dd[0]) : DW'($urandom % R);
        if ($urandom % 4 == 0) begin en = 0; @(posedge clk); #1; end
        en = 1;
        @(posedge clk); #1;
        en = 0;
        checks++;
        if (int'(disp) != dd[x]) begin
          failures++;
          if (failures < 5) $display("y%0d x%0d disp %0d exp %0d", y, x, disp, dd[x]);
        end
      end
    end
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
