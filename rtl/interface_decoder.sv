// Interface decoder: moves the LiM XNOR results into the LiM ones counter
// one bit position at a time.
//
// It is M multiplexers of N inputs to 1, one per word, sharing one bit
// counter as select.  While en_pop is high the counter advances once per
// cycle and bit_out carries bit `cnt` of every word (bit 0 first, an order
// this design chose).  stop_pop is high in the cycle that sends bit N-1, so
// a full transfer takes exactly N cycles; the counter then wraps to 0.
// rst / rst_count clear the counter.  bit_out is combinational in the
// counter and out_xnor.
module interface_decoder
  import lim_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned M = 256,
  localparam int unsigned BW = idx_width(N)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                rst_count,
  input  logic                en_pop,
  input  logic [M-1:0][N-1:0] out_xnor,
  output logic [M-1:0]        bit_out,
  output logic                stop_pop
);

  logic [BW-1:0] cnt;

  assign stop_pop = en_pop && (cnt == BW'(N - 1));

  always_ff @(posedge clk) begin
    if (rst || rst_count)
      cnt <= '0;
    else if (en_pop)
      cnt <= stop_pop ? '0 : cnt + 1'b1;
  end

  for (genvar w = 0; w < M; w++) begin : g_mux
    assign bit_out[w] = out_xnor[w][cnt];
  end

endmodule
