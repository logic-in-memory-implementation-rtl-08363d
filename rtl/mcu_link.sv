// FPGA side of the asynchronous MCU <-> FPGA protocol of the co-processor.
//
// The microcontroller and the FPGA share only general-purpose pins: six
// request lines from the MCU (rst_mcu, we_addr_mcu, we_i_mcu, we_k_mcu,
// we_compute_mcu, re_res_mcu), four response lines from the FPGA
// (ack_addr_lim, ack_write_lim, ack_read_lim, ready_lim) and a DATA_W-bit
// databus used in turn for an address, an IFMAP or K piece, or a result.
// Every exchange is a four-phase handshake, so the two sides may run at any
// clock frequencies:
//   address : MCU puts the address on the bus, raises we_addr_mcu; the link
//             latches it and raises ack_addr_lim; MCU drops we_addr_mcu;
//             ack_addr_lim falls.
//   write   : MCU puts the piece on the bus, raises we_i_mcu (IFMAP) or
//             we_k_mcu (K), waits for ack_write_lim, drops the request.
//   compute : MCU raises we_compute_mcu, waits for ready_lim, drops it.
//   read    : after an address, MCU raises re_res_mcu, waits for
//             ack_read_lim, drops re_res_mcu and reads the bus.
// This module synchronises the request lines into the FPGA clock with
// SYNC_STAGES flip-flops (this design's own guard against metastability),
// registers the bus, holds the address register and forwards the other
// requests, level for level, to the XNOR-Net (xnor_net), whose acknowledges
// it returns.  The bus is split into databus_in and databus_out with an
// output enable: the FPGA drives it from ack_read_lim until the MCU makes
// its next request.  A response follows its request after SYNC_STAGES + 1
// to SYNC_STAGES + 2 FPGA cycles.  Pin numbers are left to the board
// wrapper (rst_mcu is IO0, we_compute_mcu IO4 and ready_lim IO15 on the
// original board).
module mcu_link #(
  parameter int unsigned DATA_W      = 16,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic              clk,
  input  logic              rst,
  // MCU side
  input  logic              rst_mcu,
  input  logic              we_addr_mcu,
  input  logic              we_i_mcu,
  input  logic              we_k_mcu,
  input  logic              we_compute_mcu,
  input  logic              re_res_mcu,
  input  logic [DATA_W-1:0] databus_in,
  output logic [DATA_W-1:0] databus_out,
  output logic              databus_oe,
  output logic              ack_addr_lim,
  output logic              ack_write_lim,
  output logic              ack_read_lim,
  output logic              ready_lim,
  // XNOR-Net side
  output logic              core_rst,
  output logic              core_we_ifmap,
  output logic              core_we_k,
  output logic              core_re,
  output logic              core_enable_computing,
  output logic [DATA_W-1:0] core_addr,
  output logic [DATA_W-1:0] core_wdata,
  input  logic [DATA_W-1:0] core_ofmap,
  input  logic              core_ack_write,
  input  logic              core_ack_read,
  input  logic              core_ready
);

  localparam int unsigned NREQ = 6;

  logic [SYNC_STAGES-1:0][NREQ-1:0] sync_q;
  logic [NREQ-1:0] req_s;
  logic rst_s, we_addr_s, we_i_s, we_k_s, we_compute_s, re_res_s;
  logic [DATA_W-1:0] data_q;
  logic [DATA_W-1:0] addr_q;

  // Request synchronisers.
  always_ff @(posedge clk) begin
    sync_q[0] <= {rst_mcu, we_addr_mcu, we_i_mcu, we_k_mcu, we_compute_mcu, re_res_mcu};
    for (int s = 1; s < SYNC_STAGES; s++)
      sync_q[s] <= sync_q[s - 1];
    data_q <= databus_in;
  end

  assign req_s = sync_q[SYNC_STAGES-1];
  assign {rst_s, we_addr_s, we_i_s, we_k_s, we_compute_s, re_res_s} = req_s;

  // Address register and its acknowledge.
  always_ff @(posedge clk) begin
    if (rst || rst_s) begin
      addr_q       <= '0;
      ack_addr_lim <= 1'b0;
    end else if (we_addr_s && !ack_addr_lim) begin
      addr_q       <= data_q;
      ack_addr_lim <= 1'b1;
    end else if (!we_addr_s) begin
      ack_addr_lim <= 1'b0;
    end
  end

  // Bus turnaround: drive the result once it is acknowledged, release at the
  // MCU's next request.
  always_ff @(posedge clk) begin
    if (rst || rst_s || we_addr_s || we_i_s || we_k_s || we_compute_s)
      databus_oe <= 1'b0;
    else if (core_ack_read)
      databus_oe <= 1'b1;
  end

  assign databus_out           = core_ofmap;
  assign core_rst              = rst || rst_s;
  assign core_we_ifmap         = we_i_s;
  assign core_we_k             = we_k_s;
  assign core_re               = re_res_s;
  assign core_enable_computing = we_compute_s;
  assign core_addr             = addr_q;
  assign core_wdata            = data_q;
  assign ack_write_lim         = core_ack_write;
  assign ack_read_lim          = core_ack_read;
  assign ready_lim             = core_ready;

endmodule
