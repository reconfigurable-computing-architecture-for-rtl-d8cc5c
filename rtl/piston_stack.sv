// piston_stack: one stack line of the bidirectional shift-register LIFO used by
// the disparity path storage and the disparity storage.
//
// DEPTH registers are interleaved with 2:1 multiplexers so the whole line shifts
// either way. With dir=0 the line shifts towards higher indices: push enters at
// register 0 and pop reads register DEPTH-1. With dir=1 it shifts towards lower
// indices: push enters at DEPTH-1 and pop reads register 0. If the direction is
// reversed after every DEPTH pushes (once per image row), each row's elements are
// popped in reverse order while the next row is pushed in the same cycles, like a
// piston moving back and forth, with no stall between rows.
//
// Timing: pop_q is combinational (the element leaving on this strobe); the shift
// happens on en=1. Reset clears the line.
module piston_stack #(
  parameter int DEPTH = 640,
  parameter int W     = 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         dir,
  input  logic [W-1:0] push_d,
  output logic [W-1:0] pop_q
);
  logic [W-1:0] sr [DEPTH];

  assign pop_q = dir ? sr[0] : sr[DEPTH-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) sr[i] <= '0;
    end else if (en) begin
      for (int i = 0; i < DEPTH; i++) begin
        if (dir) sr[i] <= (i == DEPTH - 1) ? push_d : sr[(i + 1) % DEPTH];
        else     sr[i] <= (i == 0)         ? push_d : sr[(i + DEPTH - 1) % DEPTH];
      end
    end
  end
endmodule
