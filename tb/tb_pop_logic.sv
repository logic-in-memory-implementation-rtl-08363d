// Testbench of pop_logic: addressed reads and the result stream (top word
// first, stop_results on the M-th), result = 2*count - N, signed.
module tb_pop_logic;
  localparam int unsigned N = 8;
  localparam int unsigned M = 5;
  localparam int unsigned AW = $clog2(M);
  localparam int unsigned OW = $clog2(N + 1) + 1;

  logic clk = 1'b0;
  logic rst, rst_count, en_results, use_addr, stop_results;
  logic [AW-1:0] rd_addr;
  logic [M-1:0][N-1:0] count;
  logic signed [OW-1:0] ofmap;
  int checks = 0, failures = 0;

  pop_logic #(.N(N), .M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
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

  function automatic int expect_of(int unsigned c);
    return 2 * int'(c) - int'(N);
  endfunction

  initial begin
    rst = 1; rst_count = 0; en_results = 0; use_addr = 0; rd_addr = '0;
    @(posedge clk); #1 rst = 0;
    for (int round = 0; round < 4; round++) begin
      for (int w = 0; w < M; w++)
        count[w] = N'($urandom_range(N));
      if (round == 0) begin
        count[0] = '0;
        count[1] = N'(N);
      end
      use_addr = 1;
      for (int w = 0; w < M; w++) begin
        rd_addr = AW'(w); #1;
        check(int'(ofmap) == expect_of(count[w]), $sformatf("addr %0d: %0d", w, ofmap));
      end
      use_addr = 0;
      for (int i = 0; i < M; i++) begin
        en_results = 1; #1;
        check(int'(ofmap) == expect_of(count[M - 1 - i]), $sformatf("stream %0d: %0d", i, ofmap));
        check(stop_results == (i == M - 1), "stop_results");
        @(posedge clk); #1;
      end
      en_results = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
