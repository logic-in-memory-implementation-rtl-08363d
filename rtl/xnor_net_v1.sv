// First XNOR-Net: binary convolution of an N x M IFMAP with an N-bit
// weight word K, run by a free-running control unit.
//
// Datapath: LiM XNOR (IFMAP storage + one XNOR per cell) -> interface
// decoder (one bit position of every word per cycle) -> LiM ones counter
// (half-adder chain per word) -> pop logic (2*count - N, one word per
// cycle).  The control unit (xnor_cu_v1) sequences it.
//
// Interface and timing, counted in cycles with ce high, after rst falls:
//   1 cycle RESET, 1 cycle IDLE, then M cycles FILLING_XNOR in which
//   `ifmap` is sampled each cycle (first word = top word), 1 + N cycles of
//   computation, then M cycles RESULTS in which `ofmap` shows one result per
//   cycle (ofmap_valid high), in fill order; then IDLE and a new round.
// K is not stored in this version: it is a combinational input to the XNOR
// gates and must be stable during POP_COMPUTING.  ofmap_valid is this
// design's own marker of the RESULTS cycles.
module xnor_net_v1
  import lim_pkg::*;
#(
  parameter int unsigned N = 4,
  parameter int unsigned M = 2,
  localparam int unsigned OW = ofmap_width(N)
) (
  input  logic                  clk,
  input  logic                  ce,
  input  logic                  rst,
  input  logic [N-1:0]          ifmap,
  input  logic [N-1:0]          k,
  output logic signed [OW-1:0]  ofmap,
  output logic                  ofmap_valid,
  output cu_v1_state_e          state
);

  logic stop_filling, stop_pop, stop_results;
  logic rst_count, en_filling, en_pop, en_results;
  logic [M-1:0][N-1:0] out_xnor;
  logic [M-1:0][N-1:0] count;
  logic [M-1:0]        pop_bits;

  xnor_cu_v1 u_cu (
    .clk, .ce, .rst,
    .stop_filling, .stop_pop, .stop_results,
    .rst_count, .en_filling, .en_pop, .en_results,
    .state
  );

  lim_xnor #(.N(N), .M(M)) u_xnor (
    .clk, .rst, .rst_count, .en_filling, .stop_filling,
    .wr_en   (1'b0),
    .wr_word ('0),
    .wr_mask ('0),
    .din     (ifmap),
    .k,
    .out_xnor
  );

  interface_decoder #(.N(N), .M(M)) u_dec (
    .clk, .rst, .rst_count, .en_pop, .out_xnor,
    .bit_out (pop_bits),
    .stop_pop
  );

  lim_ones_counter #(.N(N), .M(M)) u_ones (
    .clk, .rst,
    .clear  (rst_count),
    .en     (en_pop),
    .bit_in (pop_bits),
    .count
  );

  pop_logic #(.N(N), .M(M)) u_pop (
    .clk, .rst, .rst_count, .en_results,
    .use_addr (1'b0),
    .rd_addr  ('0),
    .count,
    .ofmap,
    .stop_results
  );

  assign ofmap_valid = (state == V1_RESULTS);

endmodule
