// Bus-functional model of the microcontroller side of the co-processor pin
// protocol, for testbenches.  It runs on its own clock (mcu_clk, about eight times
// the FPGA clock in the testbenches), changes its outputs only on that
// clock, polls the FPGA responses once per MCU clock and follows the
// four-phase sequences:
//   address: bus <= addr, we_addr=1, wait ack_addr, we_addr=0, wait !ack_addr
//   write:   bus <= data, we_i/we_k=1, wait ack_write, drop, wait !ack_write
//   compute: we_compute=1, wait ready, we_compute=0
//   read:    address, re_res=1, wait ack_read, re_res=0, sample the bus
// It also counts the MCU cycles each wait took (last_wait).
interface mcu_bfm #(parameter int unsigned DATA_W = 16) (input logic mcu_clk);
  logic              rst_mcu;
  logic              we_addr_mcu;
  logic              we_i_mcu;
  logic              we_k_mcu;
  logic              we_compute_mcu;
  logic              re_res_mcu;
  logic [DATA_W-1:0] bus_out;   // MCU drive of the databus
  logic              bus_drive; // MCU drives the databus
  logic [DATA_W-1:0] bus_in;    // databus as seen by the MCU
  logic              ack_addr_lim;
  logic              ack_write_lim;
  logic              ack_read_lim;
  logic              ready_lim;
  int                last_wait;

  task automatic init();
    rst_mcu = 0; we_addr_mcu = 0; we_i_mcu = 0; we_k_mcu = 0;
    we_compute_mcu = 0; re_res_mcu = 0; bus_out = '0; bus_drive = 0;
  endtask

  task automatic wait_level(ref logic sig, input logic level);
    last_wait = 0;
    do begin
      @(posedge mcu_clk);
      last_wait++;
    end while (sig !== level);
  endtask

  task automatic reset_lim(int cycles);
    @(posedge mcu_clk) rst_mcu <= 1;
    repeat (cycles) @(posedge mcu_clk);
    rst_mcu <= 0;
  endtask

  task automatic send_addr(logic [DATA_W-1:0] a);
    @(posedge mcu_clk);
    bus_out <= a; bus_drive <= 1;
    @(posedge mcu_clk) we_addr_mcu <= 1;
    wait_level(ack_addr_lim, 1'b1);
    we_addr_mcu <= 0;
    wait_level(ack_addr_lim, 1'b0);
  endtask

  task automatic write_data(bit is_k, logic [DATA_W-1:0] d);
    @(posedge mcu_clk);
    bus_out <= d; bus_drive <= 1;
    @(posedge mcu_clk);
    if (is_k) we_k_mcu <= 1; else we_i_mcu <= 1;
    wait_level(ack_write_lim, 1'b1);
    we_k_mcu <= 0; we_i_mcu <= 0;
    wait_level(ack_write_lim, 1'b0);
  endtask

  task automatic write(bit is_k, logic [DATA_W-1:0] a, logic [DATA_W-1:0] d);
    send_addr(a);
    write_data(is_k, d);
  endtask

  task automatic compute();
    @(posedge mcu_clk);
    bus_drive <= 0;
    we_compute_mcu <= 1;
    wait_level(ready_lim, 1'b1);
    we_compute_mcu <= 0;
  endtask

  task automatic read(logic [DATA_W-1:0] a, output logic [DATA_W-1:0] v);
    send_addr(a);
    @(posedge mcu_clk) bus_drive <= 0;
    @(posedge mcu_clk) re_res_mcu <= 1;
    wait_level(ack_read_lim, 1'b1);
    re_res_mcu <= 0;
    wait_level(ack_read_lim, 1'b0);
    v = bus_in;
  endtask
endinterface
