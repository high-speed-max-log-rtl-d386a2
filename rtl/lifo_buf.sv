// lifo_buf: window-reversing buffer (last in, first out per window).
//
// A single W_P-entry memory reverses successive windows of W_P words. Every
// cycle the word at the current address is read (combinationally) and the new
// input word is written to the same address. The address runs upwards in one
// window slot and downwards in the next (dir), so the word read in position i
// of a slot is the one written in position W_P-1-i of the slot before: the
// output is the previous window in reverse order, one window later. Using one
// memory with alternating address direction instead of two banks is this
// design's choice.
//
// Interface: idx is the position inside the slot (0..W_P-1), dir the slot
// parity; both come from the schedule controller. The buffer is written every
// cycle; validity is tracked by the controller, not here.
module lifo_buf #(
  parameter int unsigned W_P  = 40,
  parameter int unsigned DW_P = 13
) (
  input  logic                     clk,
  input  logic [$clog2(W_P)-1:0]   idx,
  input  logic                     dir,
  input  logic [DW_P-1:0]          din,
  output logic [DW_P-1:0]          dout
);

  logic [DW_P-1:0]        mem [W_P];
  logic [$clog2(W_P)-1:0] addr;

  assign addr = dir ? ($clog2(W_P))'(W_P - 1) - idx : idx;
  assign dout = mem[addr];

  always_ff @(posedge clk) mem[addr] <= din;

endmodule
