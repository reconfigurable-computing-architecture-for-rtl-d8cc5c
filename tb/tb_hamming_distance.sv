// tb_hamming_distance: random window pairs (including identical and fully
// complementary ones) are streamed with random stalls; each result must equal
// the independently counted number of differing bits and must appear exactly
// 1 + clog2(WH*WH) accepted strobes after its inputs.
module tb_hamming_distance;
  import stereo_pkg::*;
  localparam int WH = 5, N = 9, CW = cost_width(3, WH), LAT = hd_latency(WH), NSTROBE = 300;
  logic clk = 0, rst = 1, en = 0;
  logic [N-1:0] ref_w [WH][WH];
  logic [N-1:0] cand_w [WH][WH];
  logic [CW-1:0] hd_out;
  int checks = 0, failures = 0, maxseen = 0;
  int expq [$];

  hamming_distance #(.WH(WH), .N(N), .CW(CW)) u_dut (.clk, .rst, .en, .ref_w, .cand_w, .hd_out);
  always #5 clk = ~clk;

  initial begin
    for (int k = 0; k < LAT; k++) expq.push_back(0);
    for (int j = 0; j < WH; j++) for (int i = 0; i < WH; i++) begin ref_w[j][i] = 0; cand_w[j][i] = 0; end
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int s = 0; s < NSTROBE; s++) begin
      int e, mode;
      e = 0;
      mode = $urandom % 8;
      for (int j = 0; j < WH; j++)
        for (int i = 0; i < WH; i++) begin
          ref_w[j][i]  = N'($urandom);
          cand_w[j][i] = (mode == 0) ? ref_w[j][i] : (mode == 1) ? ~ref_w[j][i] : N'($urandom);
          e += $countones(ref_w[j][i] ^ cand_w[j][i]);
        end
      en = ($urandom % 4) != 0;
      // output now reflects the inputs accepted LAT strobes ago
      #1;
      checks++;
      if (int'(hd_out) != expq[0]) begin
        failures++;
        if (failures < 5) $display("hd=%0d exp %0d", hd_out, expq[0]);
      end
      if (int'(hd_out) > maxseen) maxseen = int'(hd_out);
      @(posedge clk);
      if (en) begin
        void'(expq.pop_front());
        expq.push_back(e);
      end
      #1;
    end
    checks++;
    if (maxseen != WH * WH * N) begin failures++; $display("all-different case not seen"); end
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
