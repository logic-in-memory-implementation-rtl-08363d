// Testbench of xnor_cu: waits in FILLING_XNOR until enable_computing,
// 1 + N cycles of computation (stop_pop played by the testbench), ready in
// RESULTS, enable ignored in RESULTS, a write request returns to
// FILLING_XNOR, and the per-state permissions.
module tb_xnor_cu;
  import lim_pkg::*;
  localparam int unsigned N = 7;

  logic clk = 1'b0;
  logic rst, enable_computing, write_req, stop_pop;
  logic rst_count, en_pop, write_ok, read_ok, ready;
  cu_state_e state;
  int pop_cnt;
  int checks = 0, failures = 0;

  xnor_cu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (state %s)", what, state.name());
    end
  endtask

  // Bit counter model of the interface decoder.
  assign stop_pop = en_pop && (pop_cnt == N - 1);
  always_ff @(posedge clk)
    pop_cnt <= (rst_count || stop_pop) ? 0 : (en_pop ? pop_cnt + 1 : pop_cnt);

  task automatic check_perm();
    check(write_ok == (state == CU_FILLING_XNOR || state == CU_RESULTS), "write_ok");
    check(read_ok == (state == CU_RESULTS), "read_ok");
    check(ready == (state == CU_RESULTS), "ready");
    check(en_pop == (state == CU_POP_COMPUTING), "en_pop");
  endtask

  initial begin
    rst = 1; enable_computing = 0; write_req = 0;
    @(posedge clk); #1;
    check(state == CU_RESET, "reset");
    rst = 0;
    @(posedge clk); #1;
    for (int round = 0; round < 3; round++) begin
      int lat;
      repeat (4) begin
        @(posedge clk); #1;
        check(state == CU_FILLING_XNOR && rst_count, "waits in FILLING_XNOR");
        check_perm();
      end
      enable_computing = 1;
      @(posedge clk); #1;
      lat = 0;  // counted from the edge that samples the enable
      while (!ready && lat < 100) begin
        check_perm();
        @(posedge clk); #1 lat++;
      end
      check(lat == N + 1, $sformatf("ready after %0d cycles, want %0d", lat, N + 1));
      // enable still high in RESULTS: stays there.
      repeat (3) begin
        @(posedge clk); #1;
        check(state == CU_RESULTS, "stays in RESULTS");
        check_perm();
      end
      enable_computing = 0;
      write_req = 1;
      @(posedge clk); #1;
      check(state == CU_FILLING_XNOR, "write leaves RESULTS");
      write_req = 0;
    end
    // A pending write holds off the launch.
    write_req = 1; enable_computing = 1;
    @(posedge clk); #1;
    check(state == CU_FILLING_XNOR, "write has priority over launch");
    write_req = 0; enable_computing = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
