// tb_pixel_window_buffer: feeds a random pixel stream with random stalls and
// checks every window element against a history of the accepted pixels
// (element [j][i] must be the pixel accepted (WC-1-j)*NC + (WC-1-i) strobes
// before the newest, or 0 before the stream started).
module tb_pixel_window_buffer;
  localparam int NC = 7, WC = 3, PW = 8, NSTROBE = 200;
  logic clk = 0, rst = 1, en = 0;
  logic [PW-1:0] pix_in = 0;
  logic [PW-1:0] win [WC][WC];
  int checks = 0, failures = 0;
  int hist [$];

  pixel_window_buffer #(.NC(NC), .WC(WC), .PW(PW)) u_dut (.clk, .rst, .en, .pix_in, .win);
  always #5 clk = ~clk;

  function automatic int past(int k);  // k = 0: newest accepted pixel
    int n = hist.size();
    return (n - 1 - k >= 0) ? hist[n - 1 - k] : 0;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int s = 0; s < NSTROBE; s++) begin
      en <= ($urandom % 4) != 0;
      pix_in <= PW'($urandom);
      @(posedge clk);
      if (en) hist.push_back(int'(pix_in));
      #1;
      for (int j = 0; j < WC; j++)
        for (int i = 0; i < WC; i++) begin
          checks++;
          if (int'(win[j][i]) != past((WC-1-j)*NC + (WC-1-i))) begin
            failures++;
            if (failures < 5) $display("win[%0d][%0d]=%0d exp %0d", j, i, win[j][i], past((WC-1-j)*NC + (WC-1-i)));
          end
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
