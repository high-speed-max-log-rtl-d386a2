// block_interleaver: address generator of a ROWS_P x COLS_P block interleaver.
//
// The frame is written into a ROWS_P x COLS_P matrix row by row (natural
// address a = r*COLS_P + c) and read out column by column. The generator
// produces the natural address of the j-th element read out, pi(j), for
// j = 0, 1, 2, ... with one adder and two counters: each step moves one row
// down (address + COLS_P); after the last row it moves to the top of the next
// column. The same sequence serves as interleaver (read memory at pi(j)) and
// deinterleaver (write memory at pi(j)).
//
// Interface: start sets j = 0 (addr = 0) at the next clock edge; step advances
// j by one at the next clock edge; addr is pi(j) for the current j and wraps
// back to 0 after ROWS_P*COLS_P steps.
// A 1024-element block interleaver is what the design uses; its 32 x 32 shape
// is this design's choice.
module block_interleaver #(
  parameter int unsigned ROWS_P = 32,
  parameter int unsigned COLS_P = 32,
  localparam int unsigned N  = ROWS_P * COLS_P,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          step,
  output logic [AW-1:0] addr
);

  localparam int unsigned RW = (ROWS_P > 1) ? $clog2(ROWS_P) : 1;
  localparam int unsigned CW = (COLS_P > 1) ? $clog2(COLS_P) : 1;

  logic [RW-1:0] row;
  logic [CW-1:0] col;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row  <= '0;
      col  <= '0;
      addr <= '0;
    end else if (start) begin
      row  <= '0;
      col  <= '0;
      addr <= '0;
    end else if (step) begin
      if (row == RW'(ROWS_P - 1)) begin
        row <= '0;
        if (col == CW'(COLS_P - 1)) begin
          col  <= '0;
          addr <= '0;
        end else begin
          col  <= col + 1'b1;
          addr <= AW'(col) + 1'b1;
        end
      end else begin
        row  <= row + 1'b1;
        addr <= addr + AW'(COLS_P);
      end
    end
  end

endmodule
