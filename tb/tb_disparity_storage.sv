// tb_disparity_storage: rows of random steps are pushed back to back (with
// stalls); during each row the popped vectors must be the previous row's in
// reverse column order. This is the push-while-pop behaviour of the piston stack.
module tb_disparity_storage;
  import stereo_pkg::*;
  localparam int NC = 11, R = 1, NROWS = 12;
  logic clk = 0, rst = 1, en = 0, row_start = 0;
  step_t push_a [R];
  step_t push, pop;
  assign push = push_a[0];
  step_t pop_a [R];
  assign pop_a[0] = pop;
  int checks = 0, failures = 0;
  step_t rows [NROWS][NC][R];

  disparity_storage #(.NC(NC)) u_dut (.clk, .rst, .en, .row_start, .push, .pop);
  always #5 clk = ~clk;

  function automatic step_t rnd_step();
    case ($urandom % 3)
      0: return STEP_UP;
      1: return STEP_DOWN;
      default: return STEP_ZERO;
    endcase
  endfunction

  initial begin
    for (int z = 0; z < R; z++) push_a[z] = STEP_ZERO;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int y = 0; y < NROWS; y++)
      for (int x = 0; x < NC; x++) begin
        for (int z = 0; z < R; z++) begin rows[y][x][z] = rnd_step(); push_a[z] = rows[y][x][z]; end
        row_start = (x == 0);
        if ($urandom % 4 == 0) begin en = 0; @(posedge clk); #1; end
        en = 1;
        #1;
        if (y > 0)
          for (int z = 0; z < R; z++) begin
            checks++;
            if (pop_a[z] != rows[y-1][NC-1-x][z]) failures++;
          end
        @(posedge clk); #1;
        en = 0;
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
