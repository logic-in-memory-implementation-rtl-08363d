// Testbench of lim_coprocessor: the MCU model drives the complete protocol
// (K and IFMAP pieces, compute, reads of every result) at 32-bit words,
// M = 16, with the MCU clock about eight times the FPGA clock.  Results are
// compared with a software model; the compute time, from the MCU raising
// we_compute_mcu to ready_lim, must be N+1 FPGA cycles plus the
// synchroniser delay, whatever M is.
module tb_lim_coprocessor;
  import lim_pkg::*;
  localparam int unsigned N = 32;
  localparam int unsigned M = 16;
  localparam int unsigned DW = 16;
  localparam int unsigned CH = (N + DW - 1) / DW;
  localparam int unsigned SYNC = 2;

  logic clk = 1'b0, mcu_clk = 1'b0;
  logic rst;
  logic [DW-1:0] databus_out;
  logic databus_oe;
  cu_state_e state;
  logic [N-1:0] ifm [M];
  logic [N-1:0] kw;
  int checks = 0, failures = 0;

  mcu_bfm #(.DATA_W(DW)) mcu (.mcu_clk);

  lim_coprocessor #(.N(N), .M(M), .DATA_W(DW), .SYNC_STAGES(SYNC)) dut (
    .clk, .rst,
    .rst_mcu (mcu.rst_mcu), .we_addr_mcu (mcu.we_addr_mcu), .we_i_mcu (mcu.we_i_mcu),
    .we_k_mcu (mcu.we_k_mcu), .we_compute_mcu (mcu.we_compute_mcu), .re_res_mcu (mcu.re_res_mcu),
    .databus_in (mcu.bus_drive ? mcu.bus_out : '0),
    .databus_out, .databus_oe,
    .ack_addr_lim (mcu.ack_addr_lim), .ack_write_lim (mcu.ack_write_lim),
    .ack_read_lim (mcu.ack_read_lim), .ready_lim (mcu.ready_lim),
    .state
  );

  assign mcu.bus_in = databus_oe ? databus_out : 16'hdead;

  always #50 clk = ~clk;
  always #6 mcu_clk = ~mcu_clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int model(int w);
    int ones = 0;
    for (int b = 0; b < N; b++)
      ones += (ifm[w][b] == kw[b]);
    return 2 * ones - int'(N);
  endfunction

  // FPGA cycles from we_compute_mcu rising to ready_lim rising.
  int t_req, compute_cycles;
  always @(posedge mcu.we_compute_mcu) t_req = int'($time);
  always @(posedge mcu.ready_lim) compute_cycles = (int'($time) - t_req) / 100;

  initial begin
    logic [DW-1:0] v;
    mcu.init();
    rst = 1;
    repeat (3) @(posedge clk); #1 rst = 0;
    mcu.reset_lim(40);
    for (int round = 0; round < 2; round++) begin
      kw = N'($urandom);
      for (int c = 0; c < CH; c++)
        mcu.write(1, DW'(c), DW'(kw >> (c * DW)));
      for (int w = 0; w < M; w++) begin
        ifm[w] = N'($urandom);
        if (w == 3) ifm[w] = kw;
        if (w == 4) ifm[w] = ~kw;
        for (int c = 0; c < CH; c++)
          mcu.write(0, DW'(w * CH + c), DW'(ifm[w] >> (c * DW)));
      end
      check(state == CU_FILLING_XNOR, "filling before compute");
      mcu.compute();
      check(compute_cycles >= N + 1 + SYNC - 1 && compute_cycles <= N + 1 + SYNC + 1,
            $sformatf("compute took %0d FPGA cycles", compute_cycles));
      for (int w = 0; w < M; w++) begin
        mcu.read(DW'(w), v);
        check(int'(signed'(v)) == model(w),
              $sformatf("round %0d word %0d: %0d want %0d", round, w, signed'(v), model(w)));
      end
    end
    $display("compute time %0d FPGA cycles", compute_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
