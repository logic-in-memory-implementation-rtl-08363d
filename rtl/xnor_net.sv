// Upgraded XNOR-Net: the logic-in-memory binary convolution with a
// memory-like interface, so that an external controller (a microcontroller)
// can write, launch and read it at its own pace.
//
// Datapath as in the first version (LiM XNOR -> interface decoder -> LiM
// ones counter -> pop logic), sequenced by xnor_cu.  K now sits in a
// register because it is written through the bus.
//
// Address map (this design's own; words wider than the DATA_W-bit bus are
// written in CHUNKS = ceil(N/DATA_W) pieces, low piece first):
//   we_ifmap : addr = word*CHUNKS + piece, wdata = bits [piece*DATA_W +: DATA_W]
//   we_k     : addr = piece
//   re       : addr = word, ofmap = 2*popcount(XNOR(IFMAP[word], K)) - N,
//              sign-extended to DATA_W bits
// Writes to a word index >= M are acknowledged and dropped.
//
// Handshake: every request is a level held until its acknowledge.  The
// operation is carried out once, at the first clock edge at which the
// request is seen and the control unit allows it (writes in FILLING_XNOR
// and RESULTS, reads in RESULTS); the acknowledge (ack_write, ack_read)
// rises at that edge and falls one cycle after the request falls (four
// phases).  A request made in a state that does not allow it waits.
// enable_computing is honoured in FILLING_XNOR; ready rises N+1 cycles
// later and stays high in RESULTS until the next write.
module xnor_net
  import lim_pkg::*;
#(
  parameter int unsigned N      = 32,
  parameter int unsigned M      = 256,
  parameter int unsigned DATA_W = 16,
  localparam int unsigned CHUNKS = (N + DATA_W - 1) / DATA_W,
  localparam int unsigned AW     = idx_width(M),
  localparam int unsigned OW     = ofmap_width(N)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              we_ifmap,
  input  logic              we_k,
  input  logic              re,
  input  logic              enable_computing,
  input  logic [DATA_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] ofmap,
  output logic              ack_write,
  output logic              ack_read,
  output logic              ready,
  output cu_state_e         state
);

  logic write_req, write_ok, read_ok;
  logic rst_count, en_pop, stop_pop, stop_filling;
  logic do_write, do_read;
  logic [N-1:0] k_q;
  logic [N-1:0] piece_mask, piece_data;
  int unsigned  word_idx, piece_idx;
  logic         word_in_range;
  logic [M-1:0][N-1:0] out_xnor;
  logic [M-1:0][N-1:0] count;
  logic [M-1:0]        pop_bits;
  logic signed [OW-1:0] ofmap_sel;

  assign write_req = we_ifmap || we_k;
  assign do_write  = write_req && !ack_write && write_ok;
  assign do_read   = re && !ack_read && read_ok;

  xnor_cu u_cu (
    .clk, .rst, .enable_computing, .write_req, .stop_pop,
    .state, .rst_count, .en_pop, .write_ok, .read_ok, .ready
  );

  // Address decode of a write.
  always_comb begin
    piece_idx     = we_k ? int'(addr) : int'(addr) % CHUNKS;
    word_idx      = int'(addr) / CHUNKS;
    word_in_range = we_k ? (int'(addr) < CHUNKS) : (word_idx < M);
    for (int b = 0; b < N; b++) begin
      piece_mask[b] = (b / DATA_W) == piece_idx;
      piece_data[b] = wdata[b % DATA_W];
    end
  end

  // Weight register.
  always_ff @(posedge clk) begin
    if (rst)
      k_q <= '0;
    else if (do_write && we_k && word_in_range)
      k_q <= (k_q & ~piece_mask) | (piece_data & piece_mask);
  end

  lim_xnor #(.N(N), .M(M)) u_xnor (
    .clk, .rst, .rst_count,
    .en_filling   (1'b0),
    .stop_filling,
    .wr_en        (do_write && we_ifmap && !we_k && word_in_range),
    .wr_word      (AW'(word_idx)),
    .wr_mask      (piece_mask),
    .din          (piece_data),
    .k            (k_q),
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
    .clk, .rst, .rst_count,
    .en_results   (1'b0),
    .use_addr     (1'b1),
    .rd_addr      (AW'(addr)),
    .count,
    .ofmap        (ofmap_sel),
    .stop_results ()
  );

  // Acknowledges and the read register.
  always_ff @(posedge clk) begin
    if (rst) begin
      ack_write <= 1'b0;
      ack_read  <= 1'b0;
      ofmap     <= '0;
    end else begin
      if (do_write)
        ack_write <= 1'b1;
      else if (!write_req)
        ack_write <= 1'b0;
      if (do_read) begin
        ack_read <= 1'b1;
        ofmap    <= DATA_W'(ofmap_sel);
      end else if (!re) begin
        ack_read <= 1'b0;
      end
    end
  end

endmodule
