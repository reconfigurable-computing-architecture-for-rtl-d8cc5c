// tb_ef_block: rows of random costs (with long flat stretches so that ties and
// all three step directions occur) through the energy accumulators; energies and
// steps are compared each strobe with a direct evaluation of
// E(x,z) = C(x,z) + min{E(x-1,z-1)+L, E(x-1,z), E(x-1,z+1)+L}.
module tb_ef_block;
  import stereo_pkg::*;
  localparam int R = 6, CW = 8, EW = 14, LAMBDA = 7, NC = 10, NROWS = 20;
  logic clk = 0, rst = 1, en = 0, first = 0;
  logic [CW-1:0] cost [R];
  logic [EW-1:0] energy [R];
  step_t steps [R];
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_zero = 0;
  int e_m [R];

  ef_block #(.R(R), .CW(CW), .EW(EW), .LAMBDA(LAMBDA)) u_dut (
    .clk, .rst, .en, .first, .cost, .energy, .steps);
  always #5 clk = ~clk;

  initial begin
    for (int z = 0; z < R; z++) begin cost[z] = 0; e_m[z] = 0; end
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int y = 0; y < NROWS; y++)
      for (int x = 0; x < NC; x++) begin
        int en_m [R];
        int st_m [R];
        for (int z = 0; z < R; z++) cost[z] = CW'(($urandom % 3 == 0) ? 5 : $urandom % 40);
        first = (x == 0);
        for (int z = 0; z < R; z++) begin
          int best, st;
          best = e_m[z]; st = 0;
          if (z > 0 && e_m[z-1] + LAMBDA < best) begin best = e_m[z-1] + LAMBDA; st = -1; end
          if (z < R - 1 && e_m[z+1] + LAMBDA < best) begin best = e_m[z+1] + LAMBDA; st = 1; end
          if (x == 0) begin en_m[z] = int'(cost[z]); st_m[z] = 0; end
          else begin en_m[z] = best + int'(cost[z]); st_m[z] = st; end
        end
        #1;
        for (int z = 0; z < R; z++) begin
          checks++;
          if (step_value(steps[z]) != st_m[z] || int'(energy[z]) != e_m[z]) begin
            failures++;
            if (failures < 5) $display("y%0d x%0d z%0d step %0d exp %0d E %0d exp %0d", y, x, z,
                                       step_value(steps[z]), st_m[z], energy[z], e_m[z]);
          end
          if (st_m[z] > 0) n_up++; else if (st_m[z] < 0) n_down++; else n_zero++;
        end
        // a stalled strobe must not change the energies
        en = 0;
        @(posedge clk); #1;
        en = 1;
        @(posedge clk); #1;
        en = 0;
        e_m = en_m;
      end
    checks++;
    if (n_up == 0 || n_down == 0 || n_zero == 0) begin failures++; $display("step kinds not all seen"); end
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
