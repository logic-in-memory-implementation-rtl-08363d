// Top level: the two FPGA designs of the logic-in-memory XNOR-Net side by
// side, on one board clock.
//  * co_*  : the MCU-driven co-processor (lim_coprocessor), N x M =
//            32 x 256 (1 Kbyte of logic-in-memory), the main design.
//  * v1_*  : the stand-alone switch / LED version (fpga_board_v1), 4 x 2.
// The two share nothing but the clock; each has its own reset.  The
// co-processor's databus is split into in / out / output-enable; a pad
// wrapper would join them into one bidirectional bus.
module lim_top
  import lim_pkg::*;
#(
  parameter int unsigned N             = 32,
  parameter int unsigned M             = 256,
  parameter int unsigned DATA_W        = 16,
  parameter int unsigned SYNC_STAGES   = 2,
  parameter int unsigned V1_N          = 4,
  parameter int unsigned V1_M          = 2,
  parameter int unsigned STABLE_CYCLES = 100000
) (
  input  logic              clk,
  // co-processor
  input  logic              co_rst,
  input  logic              co_rst_mcu,
  input  logic              co_we_addr_mcu,
  input  logic              co_we_i_mcu,
  input  logic              co_we_k_mcu,
  input  logic              co_we_compute_mcu,
  input  logic              co_re_res_mcu,
  input  logic [DATA_W-1:0] co_databus_in,
  output logic [DATA_W-1:0] co_databus_out,
  output logic              co_databus_oe,
  output logic              co_ack_addr_lim,
  output logic              co_ack_write_lim,
  output logic              co_ack_read_lim,
  output logic              co_ready_lim,
  output cu_state_e         co_state,
  // stand-alone board version
  input  logic                v1_por,
  input  logic [2*V1_N-1:0]   v1_sw,
  input  logic                v1_btn_rst,
  input  logic                v1_btn_clk,
  output logic [V1_N-1:0]     v1_led,
  output logic [5:0]          v1_state_led
);

  lim_coprocessor #(.N(N), .M(M), .DATA_W(DATA_W), .SYNC_STAGES(SYNC_STAGES)) u_co (
    .clk,
    .rst            (co_rst),
    .rst_mcu        (co_rst_mcu),
    .we_addr_mcu    (co_we_addr_mcu),
    .we_i_mcu       (co_we_i_mcu),
    .we_k_mcu       (co_we_k_mcu),
    .we_compute_mcu (co_we_compute_mcu),
    .re_res_mcu     (co_re_res_mcu),
    .databus_in     (co_databus_in),
    .databus_out    (co_databus_out),
    .databus_oe     (co_databus_oe),
    .ack_addr_lim   (co_ack_addr_lim),
    .ack_write_lim  (co_ack_write_lim),
    .ack_read_lim   (co_ack_read_lim),
    .ready_lim      (co_ready_lim),
    .state          (co_state)
  );

  fpga_board_v1 #(.N(V1_N), .M(V1_M), .STABLE_CYCLES(STABLE_CYCLES)) u_v1 (
    .clk,
    .por       (v1_por),
    .sw        (v1_sw),
    .btn_rst   (v1_btn_rst),
    .btn_clk   (v1_btn_clk),
    .led       (v1_led),
    .state_led (v1_state_led)
  );

endmodule
