// tb_census_transform: random windows (with many equal pixels to exercise the
// "not smaller" case) and a check of every census bit one strobe later, including
// that the register holds its value while en is low.
module tb_census_transform;
  localparam int WC = 3, PW = 8, N = WC * WC, C = (WC - 1) / 2, NTEST = 300;
  logic clk = 0, rst = 1, en = 0;
  logic [PW-1:0] win [WC][WC];
  logic [N-1:0] cv;
  logic [N-1:0] expv, held;
  int checks = 0, failures = 0, ones = 0;

  census_transform #(.WC(WC), .PW(PW)) u_dut (.clk, .rst, .en, .win, .cv);
  always #5 clk = ~clk;

  initial begin
    for (int j = 0; j < WC; j++) for (int i = 0; i < WC; i++) win[j][i] = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    held = 0;
    for (int t = 0; t < NTEST; t++) begin
      for (int j = 0; j < WC; j++)
        for (int i = 0; i < WC; i++)
          win[j][i] = PW'(($urandom % 2) ? 100 + $urandom % 8 : $urandom);
      expv = 0;
      for (int j = 0; j < WC; j++)
        for (int i = 0; i < WC; i++)
          if (int'(win[j][i]) < int'(win[C][C])) expv[j*WC + i] = 1'b1;
      en = ($urandom % 5) != 0;
      @(posedge clk);
      #1;
      if (en) held = expv;
      checks++;
      if (cv !== held) begin
        failures++;
        if (failures < 5) $display("cv=%b exp %b", cv, held);
      end
      ones += $countones(cv);
    end
    checks++;
    if (ones == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NTEST + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
