// Testbench of interface_decoder: one bit position of every word per
// enabled cycle, bit 0 first, stop_pop exactly on the N-th bit, hold when
// disabled, restart on rst_count.
module tb_interface_decoder;
  localparam int unsigned N = 5;
  localparam int unsigned M = 3;

  logic clk = 1'b0;
  logic rst, rst_count, en_pop, stop_pop;
  logic [M-1:0][N-1:0] out_xnor;
  logic [M-1:0] bit_out;
  int checks = 0, failures = 0;

  interface_decoder #(.N(N), .M(M)) dut (.*);

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

  task automatic check_bits(int pos);
    for (int w = 0; w < M; w++)
      check(bit_out[w] == out_xnor[w][pos], $sformatf("word %0d bit %0d", w, pos));
  endtask

  initial begin
    rst = 1; rst_count = 0; en_pop = 0; out_xnor = '0;
    @(posedge clk); #1 rst = 0;
    for (int round = 0; round < 3; round++) begin
      out_xnor = (M*N)'({$urandom, $urandom});
      for (int i = 0; i < N; i++) begin
        en_pop = 1; #1;
        check_bits(i);
        check(stop_pop == (i == N - 1), $sformatf("stop_pop at %0d", i));
        @(posedge clk); #1;
        // A disabled cycle in the middle must hold the position.
        if (i == 1) begin
          en_pop = 0; #1;
          check(!stop_pop, "stop_pop low when disabled");
          @(posedge clk); #1;
          check_bits(2);
        end
      end
      en_pop = 0;
    end
    // rst_count after a partial transfer.
    en_pop = 1; @(posedge clk); @(posedge clk); #1;
    en_pop = 0; rst_count = 1; @(posedge clk); #1 rst_count = 0;
    check_bits(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
