// Testbench of lim_ones_counter: random bit streams of up to N bits per
// word, counts compared with a software tally, clear and enable checked.
module tb_lim_ones_counter;
  localparam int unsigned N = 8;
  localparam int unsigned M = 6;

  logic clk = 1'b0;
  logic rst, clear, en;
  logic [M-1:0] bit_in;
  logic [M-1:0][N-1:0] count;
  int unsigned tally [M];
  int checks = 0, failures = 0;

  lim_ones_counter #(.N(N), .M(M)) dut (.*);

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

  initial begin
    rst = 1; clear = 0; en = 0; bit_in = '0;
    @(posedge clk); #1 rst = 0;
    for (int round = 0; round < 8; round++) begin
      clear = 1; @(posedge clk); #1 clear = 0;
      for (int w = 0; w < M; w++) begin
        tally[w] = 0;
        check(count[w] == '0, "cleared");
      end
      for (int i = 0; i < N; i++) begin
        // Round 0 feeds all ones: the count must reach N exactly.
        bit_in = (round == 0) ? '1 : M'($urandom);
        en = (round == 0) || ($urandom_range(3) != 0);
        if (en)
          for (int w = 0; w < M; w++) tally[w] += bit_in[w];
        @(posedge clk); #1;
        for (int w = 0; w < M; w++)
          check(count[w] == N'(tally[w]), $sformatf("round %0d word %0d count %0d want %0d",
                                                     round, w, count[w], tally[w]));
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
