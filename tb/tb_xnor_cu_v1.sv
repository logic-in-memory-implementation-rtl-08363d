// Testbench of xnor_cu_v1: the testbench plays the datapath counters
// (stop_filling after M enabled cycles, stop_pop after N, stop_results
// after M) and checks the state timeline, the enables and the clock
// enable.
module tb_xnor_cu_v1;
  import lim_pkg::*;
  localparam int unsigned N = 6;
  localparam int unsigned M = 3;

  logic clk = 1'b0;
  logic ce, rst, stop_filling, stop_pop, stop_results;
  logic rst_count, en_filling, en_pop, en_results;
  cu_v1_state_e state;
  int phase_cnt;
  int checks = 0, failures = 0;

  xnor_cu_v1 dut (.*);

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

  // Counter model.
  always_comb begin
    stop_filling = en_filling && (phase_cnt == M - 1);
    stop_pop     = en_pop && (phase_cnt == N - 1);
    stop_results = en_results && (phase_cnt == M - 1);
  end

  always_ff @(posedge clk) begin
    if (rst_count || !(en_filling || en_pop || en_results))
      phase_cnt <= (en_filling || en_pop || en_results) ? phase_cnt + 1 : 0;
    else if (stop_filling || stop_pop || stop_results)
      phase_cnt <= 0;
    else
      phase_cnt <= phase_cnt + 1;
  end

  task automatic expect_state(cu_v1_state_e s, int cycles);
    for (int i = 0; i < cycles; i++) begin
      #1 check(state == s, $sformatf("expected %s cycle %0d", s.name(), i));
      check(en_filling == (s == V1_FILLING_XNOR), "en_filling");
      check(en_pop == (s == V1_POP_COMPUTING), "en_pop");
      check(en_results == (s == V1_RESULTS), "en_results");
      @(posedge clk);
    end
  endtask

  initial begin
    ce = 1; rst = 1;
    @(posedge clk); @(posedge clk); #1;
    check(state == V1_RESET && rst_count, "reset state");
    rst = 0;
    @(posedge clk);
    for (int round = 0; round < 2; round++) begin
      expect_state(V1_IDLE, 1);
      expect_state(V1_FILLING_XNOR, M);
      expect_state(V1_PRE_POP_COMPUTING, 1);
      expect_state(V1_POP_COMPUTING, N);
      expect_state(V1_RESULTS, M);
    end
    // With ce low the machine holds.
    #1 ce = 0;
    repeat (5) @(posedge clk);
    #1 check(state == V1_IDLE, "hold with ce low");
    check(!en_filling && !en_pop && !en_results, "no enables with ce low");
    ce = 1;
    @(posedge clk);
    expect_state(V1_FILLING_XNOR, 1);
    #1 rst = 1; @(posedge clk); #1;
    check(state == V1_RESET, "reset mid-flow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
