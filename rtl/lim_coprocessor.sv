// Logic-in-memory XNOR-Net co-processor: the FPGA design of the MCU + FPGA
// system.  The MCU fills the LiM XNOR with IFMAP and K through the
// four-phase pin protocol, launches the computation, waits for ready_lim
// and reads the OFMAP results one by one (see mcu_link for the protocol and
// xnor_net for the address map and timing).  Computing takes N+1 FPGA
// cycles whatever M is, since all words are processed in parallel.
// This module only wires mcu_link in front of xnor_net.
module lim_coprocessor
  import lim_pkg::*;
#(
  parameter int unsigned N           = 32,
  parameter int unsigned M           = 256,
  parameter int unsigned DATA_W      = 16,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic              clk,
  input  logic              rst,
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
  output cu_state_e         state
);

  logic              core_rst, core_we_ifmap, core_we_k, core_re, core_enable_computing;
  logic [DATA_W-1:0] core_addr, core_wdata, core_ofmap;
  logic              core_ack_write, core_ack_read, core_ready;

  mcu_link #(.DATA_W(DATA_W), .SYNC_STAGES(SYNC_STAGES)) u_link (
    .clk, .rst,
    .rst_mcu, .we_addr_mcu, .we_i_mcu, .we_k_mcu, .we_compute_mcu, .re_res_mcu,
    .databus_in, .databus_out, .databus_oe,
    .ack_addr_lim, .ack_write_lim, .ack_read_lim, .ready_lim,
    .core_rst, .core_we_ifmap, .core_we_k, .core_re, .core_enable_computing,
    .core_addr, .core_wdata, .core_ofmap, .core_ack_write, .core_ack_read, .core_ready
  );

  xnor_net #(.N(N), .M(M), .DATA_W(DATA_W)) u_net (
    .clk,
    .rst              (core_rst),
    .we_ifmap         (core_we_ifmap),
    .we_k             (core_we_k),
    .re               (core_re),
    .enable_computing (core_enable_computing),
    .addr             (core_addr),
    .wdata            (core_wdata),
    .ofmap            (core_ofmap),
    .ack_write        (core_ack_write),
    .ack_read         (core_ack_read),
    .ready            (core_ready),
    .state
  );

endmodule
