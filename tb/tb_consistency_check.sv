// tb_consistency_check: two random disparity streams, the right one trailing by
// R-1 positions as in the core, with a share of right values copied from the
// matching left position so that both outcomes occur. Each output must carry
// Dr(x) and the flag Dr(x) == Dl(x + Dr(x)), two strobes after Dr(x) entered.
module tb_consistency_check;
  import stereo_pkg::*;
  localparam int R = 6, DW = disp_width(R), NS = 400;
  logic clk = 0, rst = 1, en = 0;
  logic [DW-1:0] dl = 0, dr = 0;
  logic [DW-1:0] disp;
  logic ok;
  int checks = 0, failures = 0, n_ok = 0, n_bad = 0;
  int lseq [NS + R];
  int rseq [NS];

  consistency_check #(.R(R), .DW(DW)) u_dut (.clk, .rst, .en, .dl, .dr, .disp, .ok);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < NS + R; i++) lseq[i] = $urandom % R;
    for (int i = 0; i < NS; i++) begin
      rseq[i] = $urandom % R;
      if ($urandom % 2) begin
        // make it consistent where possible
        for (int d = 0; d < R; d++) if (lseq[i + d] == d) rseq[i] = d;
      end
    end
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // strobe k presents Dl(k) and Dr(k-(R-1))
    for (int k = 0; k < NS + R - 1 + 2; k++) begin
      dl = (k < NS + R) ? DW'(lseq[k]) : '0;
      dr = (k - (R - 1) >= 0 && k - (R - 1) < NS) ? DW'(rseq[k - (R - 1)]) : '0;
      if ($urandom % 4 == 0) begin en = 0; @(posedge clk); #1; end
      en = 1;
      @(posedge clk); #1;
      en = 0;
      // after strobe k the output holds the result of Dr(k-1-(R-1))
      if (k - 1 - (R - 1) >= 0 && k - 1 - (R - 1) < NS) begin
        int x; bit e;
        x = k - 1 - (R - 1);
        e = (lseq[x + rseq[x]] == rseq[x]);
        checks++;
        if (int'(disp) != rseq[x] || ok != e) begin
          failures++;
          if (failures < 5) $display("x%0d disp %0d exp %0d ok %0d exp %0d", x, disp, rseq[x], ok, e);
        end
        if (e) n_ok++; else n_bad++;
      end
    end
    checks++;
    if (n_ok == 0 || n_bad == 0) failures++;
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
