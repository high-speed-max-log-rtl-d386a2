// fifo_buf: one-window delay buffer (first in, first out).
//
// A W_P-entry circular memory: each cycle the word at address idx is read
// (combinationally) and the new input word is written there, so the output is
// the input of exactly W_P cycles earlier, in the same order.
//
// Interface: idx is the position inside the window slot (0..W_P-1) from the
// schedule controller; the buffer is written every cycle.
module fifo_buf #(
  parameter int unsigned W_P  = 40,
  parameter int unsigned DW_P = 13
) (
  input  logic                   clk,
  input  logic [$clog2(W_P)-1:0] idx,
  input  logic [DW_P-1:0]        din,
  output logic [DW_P-1:0]        dout
);

  logic [DW_P-1:0] mem [W_P];

  assign dout = mem[idx];

  always_ff @(posedge clk) mem[idx] <= din;

endmodule
