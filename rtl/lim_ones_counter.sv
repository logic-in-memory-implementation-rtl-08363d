// LiM ones counter: an N-bit x M-word array whose cells are a flip-flop and
// a half adder.
//
// The half adders of one word form a ripple incrementer: the first cell
// takes the bit sent by the interface decoder as its carry input, each
// further cell takes the carry of the cell before it, and every flip-flop
// stores the sum of its half adder.  After the N bits of a word have been
// received the flip-flops of that word hold its number of 1s, read directly
// on `count`.  The array has the same N x M size as the LiM XNOR, as in the
// design description (only clog2(N+1) of the N bits are ever non-zero).
// The carry out of the last cell is dropped: a word never counts past N.
// clear (or rst) zeroes every cell; en gates accumulation.  One bit is
// added per enabled cycle; count is the register value.
module lim_ones_counter
  import lim_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned M = 256
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                clear,
  input  logic                en,
  input  logic [M-1:0]        bit_in,
  output logic [M-1:0][N-1:0] count
);

  for (genvar w = 0; w < M; w++) begin : g_word
    logic [N-1:0] carry;

    assign carry[0] = bit_in[w];

    // One half adder and one flip-flop per cell.
    for (genvar b = 0; b < N; b++) begin : g_cell
      logic sum;
      logic cell_q;

      assign count[w][b]  = cell_q;
      assign sum          = cell_q ^ carry[b];
      if (b < N - 1) begin : g_carry
        assign carry[b + 1] = cell_q & carry[b];
      end

      always_ff @(posedge clk) begin
        if (rst || clear)
          cell_q <= 1'b0;
        else if (en)
          cell_q <= sum;
      end
    end
  end

endmodule
