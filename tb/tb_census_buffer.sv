// tb_census_buffer: random census vectors with random stalls; every tap of every
// offset window is checked against the history of accepted vectors: window o,
// element [j][i] must be the vector accepted o + (WH-1-j)*NC + (WH-1-i) strobes
// before the newest one.
module tb_census_buffer;
  localparam int NC = 9, WH = 5, R = 4, N = 9, NSTROBE = 200;
  logic clk = 0, rst = 1, en = 0;
  logic [N-1:0] cv_in = 0;
  logic [N-1:0] cwin [R][WH][WH];
  int checks = 0, failures = 0;
  int hist [$];

  census_buffer #(.NC(NC), .WH(WH), .R(R), .N(N)) u_dut (.clk, .rst, .en, .cv_in, .cwin);
  always #5 clk = ~clk;

  function automatic int past(int k);
    int n = hist.size();
    return (n - 1 - k >= 0) ? hist[n - 1 - k] : 0;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int s = 0; s < NSTROBE; s++) begin
      en <= ($urandom % 4) != 0;
      cv_in <= N'($urandom);
      @(posedge clk);
      if (en) hist.push_back(int'(cv_in));
      #1;
      for (int o = 0; o < R; o++)
        for (int j = 0; j < WH; j++)
          for (int i = 0; i < WH; i++) begin
            checks++;
            if (int'(cwin[o][j][i]) != past(o + (WH-1-j)*NC + (WH-1-i))) failures++;
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSTROBE + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
