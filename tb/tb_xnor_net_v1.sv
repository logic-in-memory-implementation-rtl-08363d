// Testbench of xnor_net_v1: feeds IFMAP words in the FILLING_XNOR cycles,
// holds K, and checks every streamed result against a software model and
// the cycle at which RESULTS starts (2 + M + 1 + N cycles after reset).
// Run at N = 8, M = 5 and at the 4 x 2 default size.
module tb_xnor_net_v1;
  import lim_pkg::*;

  logic clk = 1'b0;
  int checks = 0, failures = 0;
  int done = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  function automatic int model(logic [63:0] ifm, logic [63:0] k, int n);
    int ones = 0;
    for (int b = 0; b < n; b++)
      ones += (ifm[b] == k[b]);
    return 2 * ones - n;
  endfunction

  // One instance per size, each driven by the same generic process.
  `define TB_V1_RUN(NN, MM, TAG) \
  begin : TAG \
    logic ce, rst; \
    logic [NN-1:0] ifmap, k; \
    logic signed [$clog2(NN+1):0] ofmap; \
    logic ofmap_valid; \
    cu_v1_state_e state; \
    logic [NN-1:0] words [MM]; \
    xnor_net_v1 #(.N(NN), .M(MM)) dut (.clk, .ce, .rst, .ifmap, .k, .ofmap, .ofmap_valid, .state); \
    initial begin \
      ce = 1; rst = 1; ifmap = '0; k = '0; \
      @(posedge clk); #1 rst = 0; \
      for (int round = 0; round < 3; round++) begin \
        int cyc = 0; \
        while (state != V1_FILLING_XNOR) begin @(posedge clk); #1 cyc++; end \
        if (round == 0) check(cyc == 2, $sformatf("%m fill starts at cycle %0d", cyc)); \
        for (int i = 0; i < MM; i++) begin \
          ifmap = NN'($urandom); words[i] = ifmap; \
          check(state == V1_FILLING_XNOR, "%m filling"); \
          @(posedge clk); #1; \
        end \
        k = NN'($urandom); \
        ifmap = '0; \
        check(state == V1_PRE_POP_COMPUTING, "%m pre-pop after M fills"); \
        repeat (1 + NN) @(posedge clk); #1; \
        check(state == V1_RESULTS, "%m results after 1+N cycles"); \
        for (int i = 0; i < MM; i++) begin \
          check(ofmap_valid, "%m valid"); \
          check(int'(ofmap) == model(64'(words[i]), 64'(k), NN), \
                $sformatf("%m round %0d word %0d: %0d want %0d", round, i, ofmap, \
                          model(64'(words[i]), 64'(k), NN))); \
          @(posedge clk); #1; \
        end \
        check(state == V1_IDLE && !ofmap_valid, "%m back to idle"); \
      end \
      done++; \
    end \
  end

  `TB_V1_RUN(8, 5, g_8x5)
  `TB_V1_RUN(4, 2, g_4x2)

  initial begin
    wait (done == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
