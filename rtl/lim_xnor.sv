// LiM XNOR: an N-bit x M-word logic-in-memory array.
//
// Every cell is a flip-flop that stores one IFMAP bit and an XNOR gate that
// compares it with the matching bit of the weight word K, so the whole array
// produces all M x N XNOR products at once, in the same cycle K is applied
// (K is a combinational input; out_xnor is combinational in K and the stored
// bits).
//
// Writing.  Each word has a word enable (EN_WORD).  Two ways drive it:
//  * sequential fill (first version): while en_filling is high one word is
//    written per cycle from din, top word (row M-1, the EN_WORD MSB) first.
//    A fill counter inside the array raises stop_filling in the cycle that
//    writes the last word, so filling takes exactly M cycles.
//  * addressed write (upgraded version): wr_en writes the bits of word
//    wr_word selected by wr_mask from din.  The mask lets a word wider than
//    the external bus be written in pieces; it is this design's own choice.
// The stored bits are a memory and are not reset; rst and rst_count clear
// only the fill counter.
module lim_xnor
  import lim_pkg::*;
#(
  parameter int unsigned N = 32,   // bits per word (length of K)
  parameter int unsigned M = 256,  // words (IFMAP length / K length)
  localparam int unsigned AW = idx_width(M)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 rst_count,
  input  logic                 en_filling,
  output logic                 stop_filling,
  input  logic                 wr_en,
  input  logic [AW-1:0]        wr_word,
  input  logic [N-1:0]         wr_mask,
  input  logic [N-1:0]         din,
  input  logic [N-1:0]         k,
  output logic [M-1:0][N-1:0]  out_xnor
);

  logic [AW-1:0] fill_cnt;

  assign stop_filling = en_filling && (fill_cnt == AW'(M - 1));

  always_ff @(posedge clk) begin
    if (rst || rst_count)
      fill_cnt <= '0;
    else if (en_filling)
      fill_cnt <= stop_filling ? '0 : fill_cnt + 1'b1;
  end

  // One word enable per row (the MSB is the first word filled), then one
  // storage flip-flop and one XNOR gate per cell.
  for (genvar w = 0; w < M; w++) begin : g_word
    logic en_word;

    assign en_word = en_filling ? (fill_cnt == AW'(M - 1 - w))
                                : (wr_en && (wr_word == AW'(w)));

    for (genvar b = 0; b < N; b++) begin : g_cell
      logic cell_q;

      always_ff @(posedge clk) begin
        if (en_word && (en_filling || wr_mask[b]))
          cell_q <= din[b];
      end

      assign out_xnor[w][b] = ~(cell_q ^ k[b]);
    end
  end

endmodule
