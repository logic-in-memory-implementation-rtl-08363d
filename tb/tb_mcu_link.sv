// Testbench of mcu_link: the MCU model, on a clock about eight times faster
// than the link's, with a simple register model of the XNOR-Net behind
// it.  Checks the latched address, the forwarded write data, the read
// result on the bus with its output enable, the forwarded compute and reset,
// and the response latency of the synchronised handshake.
module tb_mcu_link;
  localparam int unsigned DW = 16;
  localparam int unsigned SYNC = 2;

  logic clk = 1'b0, mcu_clk = 1'b0;
  logic rst;
  logic [DW-1:0] databus_out;
  logic databus_oe;
  logic core_rst, core_we_ifmap, core_we_k, core_re, core_enable_computing;
  logic [DW-1:0] core_addr, core_wdata, core_ofmap;
  logic core_ack_write, core_ack_read, core_ready;
  int checks = 0, failures = 0;
  // Register model of the XNOR-Net: stores written data by address.
  logic [DW-1:0] mem_i [16];
  logic [DW-1:0] mem_k [4];
  int computes = 0;

  mcu_bfm #(.DATA_W(DW)) mcu (.mcu_clk);

  mcu_link #(.DATA_W(DW), .SYNC_STAGES(SYNC)) dut (
    .clk, .rst,
    .rst_mcu (mcu.rst_mcu), .we_addr_mcu (mcu.we_addr_mcu), .we_i_mcu (mcu.we_i_mcu),
    .we_k_mcu (mcu.we_k_mcu), .we_compute_mcu (mcu.we_compute_mcu), .re_res_mcu (mcu.re_res_mcu),
    .databus_in (mcu.bus_drive ? mcu.bus_out : '0),
    .databus_out, .databus_oe,
    .ack_addr_lim (mcu.ack_addr_lim), .ack_write_lim (mcu.ack_write_lim),
    .ack_read_lim (mcu.ack_read_lim), .ready_lim (mcu.ready_lim),
    .core_rst, .core_we_ifmap, .core_we_k, .core_re, .core_enable_computing,
    .core_addr, .core_wdata, .core_ofmap, .core_ack_write, .core_ack_read, .core_ready
  );

  assign mcu.bus_in = databus_oe ? databus_out : 16'hdead;

  always #50 clk = ~clk;
  always #6 mcu_clk = ~mcu_clk;

  always_ff @(posedge clk) begin
    if (core_rst) begin
      core_ack_write <= 0; core_ack_read <= 0; core_ready <= 0; core_ofmap <= '0;
    end else begin
      if ((core_we_ifmap || core_we_k) && !core_ack_write) begin
        core_ack_write <= 1;
        if (core_we_ifmap) mem_i[core_addr[3:0]] <= core_wdata;
        else mem_k[core_addr[1:0]] <= core_wdata;
      end else if (!(core_we_ifmap || core_we_k)) core_ack_write <= 0;
      if (core_re && !core_ack_read) begin
        core_ack_read <= 1;
        core_ofmap <= mem_i[core_addr[3:0]] ^ mem_k[0];
      end else if (!core_re) core_ack_read <= 0;
      if (core_enable_computing && !core_ready) begin
        core_ready <= 1; computes++;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
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

  // FPGA cycles from a request edge to its acknowledge.
  int req_t, lat_min = 1000, lat_max = 0;
  always @(posedge mcu.we_addr_mcu) req_t = $time;
  always @(posedge mcu.ack_addr_lim) begin
    int l;
    l = int'(($time - req_t) / 100);
    if (l < lat_min) lat_min = l;
    if (l > lat_max) lat_max = l;
  end

  initial begin
    logic [DW-1:0] ref_i [16];
    logic [DW-1:0] v;
    mcu.init();
    rst = 1;
    repeat (3) @(posedge clk); #1 rst = 0;
    mcu.reset_lim(40);
    repeat (SYNC + 2) @(posedge clk);
    check(!core_rst, "reset released");
    mcu.write(1, 0, 16'h5a5a);
    check(mem_k[0] == 16'h5a5a, "K written");
    for (int a = 0; a < 16; a++) begin
      ref_i[a] = DW'($urandom);
      mcu.write(0, DW'(a), ref_i[a]);
      check(core_addr == DW'(a), "address latched");
      check(mem_i[a] == ref_i[a], $sformatf("IFMAP %0d written", a));
    end
    mcu.compute();
    check(computes == 1, "compute forwarded once");
    check(!databus_oe, "bus released before reads");
    for (int a = 15; a >= 0; a--) begin
      mcu.read(DW'(a), v);
      check(v == (ref_i[a] ^ 16'h5a5a), $sformatf("read %0d got %h", a, v));
      check(databus_oe, "bus driven after read");
    end
    mcu.send_addr(16'h0003);
    check(!databus_oe, "bus released at next request");
    check(lat_min >= SYNC && lat_max <= SYNC + 2,
          $sformatf("ack latency %0d..%0d FPGA cycles", lat_min, lat_max));
    mcu.reset_lim(40);
    check(!core_ready && !databus_oe, "rst_mcu resets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
