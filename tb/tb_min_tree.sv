// tb_min_tree: random energy vectors of the default size (R = 30), many with a
// repeated minimum; the index must be the lowest position holding the minimum.
module tb_min_tree;
  localparam int R = 30, EW = 18, DW = $clog2(R), NTEST = 500;
  logic [EW-1:0] energy [R];
  logic [DW-1:0] idx;
  int checks = 0, failures = 0;

  min_tree #(.R(R), .EW(EW), .DW(DW)) u_dut (.energy, .idx);

  initial begin
    for (int t = 0; t < NTEST; t++) begin
      int m;
      for (int z = 0; z < R; z++) energy[z] = EW'((t % 2) ? $urandom % 8 : $urandom);
      m = 0;
      for (int z = 1; z < R; z++) if (energy[z] < energy[m]) m = z;
      #1;
      checks++;
      if (int'(idx) != m) begin
        failures++;
        if (failures < 5) $display("idx=%0d exp %0d", idx, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(NTEST * 2 + 100);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
