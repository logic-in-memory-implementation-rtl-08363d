// End-to-end testbench of lim_top at its default sizes: the co-processor
// at 32-bit x 256-word (1 Kbyte) and the 4 x 2 board version with a
// 100000-cycle debounce.
//  Co-processor: the MCU model resets the array over rst_mcu, writes K and
//  all IFMAP pieces, computes, reads every result and compares it with a
//  software model; then rewrites K in RESULTS (back to FILLING_XNOR),
//  recomputes and rereads.  A read requested during the computation must
//  wait for RESULTS.
//  Board version: bouncing RST and CLK presses, switches set per step, one
//  complete round with both results checked on the LEDs.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_lim_top;
  import lim_pkg::*;
  localparam int unsigned N = 32;
  localparam int unsigned M = 256;
  localparam int unsigned DW = 16;
  localparam int unsigned CH = (N + DW - 1) / DW;
  localparam int unsigned VN = 4;
  localparam int unsigned VM = 2;
  localparam int unsigned STABLE = 100000;

  logic clk = 1'b0, mcu_clk = 1'b0;
  logic co_rst;
  logic [DW-1:0] co_databus_out;
  logic co_databus_oe;
  cu_state_e co_state;
  logic v1_por;
  logic [2*VN-1:0] v1_sw;
  logic v1_btn_rst, v1_btn_clk;
  logic [VN-1:0] v1_led;
  logic [5:0] v1_state_led;
  logic [N-1:0] ifm [M];
  logic [N-1:0] kw;
  int checks = 0, failures = 0;
  int done = 0;
  // Mechanism counters.
  int n_lim_reset = 0, n_k_write = 0, n_ifmap_write = 0, n_compute = 0, n_read = 0;
  int n_results_write = 0, n_read_wait = 0, n_bus_turn = 0;
  int n_bounce_reject = 0, n_v1_step = 0, n_v1_result = 0, n_v1_round = 0;

  mcu_bfm #(.DATA_W(DW)) mcu (.mcu_clk);

  lim_top dut (
    .clk,
    .co_rst,
    .co_rst_mcu (mcu.rst_mcu), .co_we_addr_mcu (mcu.we_addr_mcu), .co_we_i_mcu (mcu.we_i_mcu),
    .co_we_k_mcu (mcu.we_k_mcu), .co_we_compute_mcu (mcu.we_compute_mcu),
    .co_re_res_mcu (mcu.re_res_mcu),
    .co_databus_in (mcu.bus_drive ? mcu.bus_out : '0),
    .co_databus_out, .co_databus_oe,
    .co_ack_addr_lim (mcu.ack_addr_lim), .co_ack_write_lim (mcu.ack_write_lim),
    .co_ack_read_lim (mcu.ack_read_lim), .co_ready_lim (mcu.ready_lim),
    .co_state,
    .v1_por, .v1_sw, .v1_btn_rst, .v1_btn_clk, .v1_led, .v1_state_led
  );

  assign mcu.bus_in = co_databus_oe ? co_databus_out : 16'hdead;

  always #50 clk = ~clk;
  always #6 mcu_clk = ~mcu_clk;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  always @(posedge co_databus_oe) n_bus_turn++;

  task automatic read_all(int round);
    logic [DW-1:0] v;
    for (int w = 0; w < M; w++) begin
      mcu.read(DW'(w), v);
      n_read++;
      check(int'(signed'(v)) == model(w),
            $sformatf("round %0d word %0d: %0d want %0d", round, w, signed'(v), model(w)));
    end
  endtask

  // Co-processor run.
  initial begin
    logic [DW-1:0] v;
    mcu.init();
    co_rst = 1;
    repeat (3) @(posedge clk); #1 co_rst = 0;
    mcu.reset_lim(40);
    n_lim_reset++;
    kw = N'($urandom);
    for (int c = 0; c < CH; c++) begin
      mcu.write(1, DW'(c), DW'(kw >> (c * DW)));
      n_k_write++;
    end
    for (int w = 0; w < M; w++) begin
      ifm[w] = N'($urandom);
      if (w == 0) ifm[w] = kw;
      if (w == M - 1) ifm[w] = ~kw;
      for (int c = 0; c < CH; c++) begin
        mcu.write(0, DW'(w * CH + c), DW'(ifm[w] >> (c * DW)));
        n_ifmap_write++;
      end
    end
    check(co_state == CU_FILLING_XNOR, "filling prev_led compute");
    mcu.compute();
    n_compute++;
    read_all(0);
    // New K written in RESULTS: back to FILLING_XNOR, IFMAP kept.
    check(co_state == CU_RESULTS, "results held");
    kw = N'($urandom);
    for (int c = 0; c < CH; c++) begin
      mcu.write(1, DW'(c), DW'(kw >> (c * DW)));
      n_k_write++;
    end
    if (co_state == CU_FILLING_XNOR) n_results_write++;
    check(co_state == CU_FILLING_XNOR, "write in RESULTS returns to FILLING_XNOR");
    // Launch, and request a read while computing: it must wait.
    mcu.send_addr(DW'(7));
    fork
      mcu.compute();
      begin
        @(posedge mcu_clk) mcu.re_res_mcu <= 1;
        mcu.wait_level(mcu.ack_read_lim, 1'b1);
        check(mcu.ready_lim, "read acknowledged only in RESULTS");
        if (mcu.last_wait > N) n_read_wait++;
        mcu.re_res_mcu <= 0;
        mcu.wait_level(mcu.ack_read_lim, 1'b0);
        check(int'(signed'(mcu.bus_in)) == model(7), "waiting read result");
      end
    join
    n_compute++;
    read_all(1);
    done++;
  end

  // Board version run.
  function automatic logic [VN-1:0] v1_model(logic [VN-1:0] ifmv, logic [VN-1:0] k);
    int ones = 0;
    for (int b = 0; b < VN; b++)
      ones += (ifmv[b] == k[b]);
    return VN'(2 * ones - int'(VN));
  endfunction

  task automatic v1_step();
    // Two short bounces that the debouncer must reject, then a real press.
    logic [5:0] led_at_start;
    led_at_start = v1_state_led;
    repeat (2) begin
      v1_btn_clk = 0; repeat (500) @(posedge clk);
      v1_btn_clk = 1; repeat (200) @(posedge clk);
    end
    #1;
    if (v1_state_led == led_at_start) n_bounce_reject++;
    else check(0, "bounce stepped the board version");
    v1_btn_clk = 0; repeat (STABLE + 10) @(posedge clk);
    v1_btn_clk = 1; repeat (20) @(posedge clk);
    #1 n_v1_step++;
  endtask

  initial begin
    logic [VN-1:0] words [VM];
    logic [VN-1:0] k;
    logic [5:0] prev_led;
    v1_por = 1; v1_sw = '0; v1_btn_rst = 0; v1_btn_clk = 1;
    repeat (3) @(posedge clk); #1 v1_por = 0;
    v1_btn_rst = 1; repeat (STABLE + 10) @(posedge clk);
    v1_btn_rst = 0; repeat (20) @(posedge clk); #1;
    check(v1_state_led == 6'b000001, "board version in RESET");
    // Check that a bounce alone does not step the machine.
    prev_led = v1_state_led;
    v1_btn_clk = 0; repeat (STABLE / 2) @(posedge clk);
    v1_btn_clk = 1; repeat (20) @(posedge clk); #1;
    check(v1_state_led == prev_led, "short press rejected");
    v1_step();
    check(v1_state_led == 6'b000010, "IDLE");
    v1_step();
    check(v1_state_led == 6'b000100, "FILLING_XNOR");
    k = VN'($urandom);
    for (int i = 0; i < VM; i++) begin
      words[i] = VN'($urandom);
      v1_sw = {words[i], k};
      v1_step();
    end
    check(v1_state_led == 6'b001000, "PRE_POP_COMPUTING");
    repeat (1 + VN) v1_step();
    check(v1_state_led == 6'b100000, "RESULTS");
    for (int i = 0; i < VM; i++) begin
      check(v1_led == v1_model(words[i], k),
            $sformatf("board LEDs %b want %b", v1_led, v1_model(words[i], k)));
      n_v1_result++;
      v1_step();
    end
    if (v1_state_led == 6'b000010) n_v1_round++;
    check(v1_state_led == 6'b000010, "back to IDLE");
    done++;
  end

  initial begin
    wait (done == 2);
    $display("mechanisms: lim_reset=%0d k_write=%0d ifmap_write=%0d compute=%0d read=%0d",
             n_lim_reset, n_k_write, n_ifmap_write, n_compute, n_read);
    $display("            results_write=%0d read_wait=%0d bus_turn=%0d", n_results_write,
             n_read_wait, n_bus_turn);
    $display("            bounce_reject=%0d v1_step=%0d v1_result=%0d v1_round=%0d",
             n_bounce_reject, n_v1_step, n_v1_result, n_v1_round);
    check(n_lim_reset > 0, "mechanism: reset over rst_mcu");
    check(n_k_write > 0, "mechanism: K write");
    check(n_ifmap_write > 0, "mechanism: IFMAP write");
    check(n_compute > 0, "mechanism: compute");
    check(n_read > 0, "mechanism: read");
    check(n_results_write > 0, "mechanism: write from RESULTS");
    check(n_read_wait > 0, "mechanism: read waiting for RESULTS");
    check(n_bus_turn > 0, "mechanism: databus turnaround");
    check(n_bounce_reject > 0, "mechanism: bounce rejected");
    check(n_v1_step > 0, "mechanism: board step");
    check(n_v1_result > 0, "mechanism: board result");
    check(n_v1_round > 0, "mechanism: board round complete");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
