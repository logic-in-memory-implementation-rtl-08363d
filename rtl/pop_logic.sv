// Pop counting logic: turns a word's count of 1s into the XNOR-Net result,
// the number of 1s minus the number of 0s of the word.
//
// A multiplexer selects one word's count, a shifter doubles it and a
// subtractor removes the word length: ofmap = 2*count - N, signed.  Words
// are handled one at a time, not in parallel.  Two select sources:
//  * stream (first version): a result counter, advanced by en_results once
//    per cycle, picks the words in the order they were filled (row M-1
//    first); stop_results is high in the cycle the last word is selected.
//  * address (upgraded version): with use_addr high, rd_addr picks the word.
// ofmap is combinational in the select and the counts.  The stream order
// and the result width are this design's own choices.
module pop_logic
  import lim_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned M = 256,
  localparam int unsigned AW = idx_width(M),
  localparam int unsigned OW = ofmap_width(N)
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  rst_count,
  input  logic                  en_results,
  input  logic                  use_addr,
  input  logic [AW-1:0]         rd_addr,
  input  logic [M-1:0][N-1:0]   count,
  output logic signed [OW-1:0]  ofmap,
  output logic                  stop_results
);

  logic [AW-1:0] res_cnt;
  logic [AW-1:0] sel;
  logic [N-1:0]  word_cnt;
  logic [OW-1:0] doubled;

  assign stop_results = en_results && (res_cnt == AW'(M - 1));

  always_ff @(posedge clk) begin
    if (rst || rst_count)
      res_cnt <= '0;
    else if (en_results)
      res_cnt <= stop_results ? '0 : res_cnt + 1'b1;
  end

  assign sel      = use_addr ? rd_addr : AW'(M - 1) - res_cnt;
  assign word_cnt = count[sel];

  // Shift left by one, then subtract the word length.
  assign doubled = OW'(word_cnt) << 1;
  assign ofmap   = signed'(doubled - OW'(N));

endmodule
