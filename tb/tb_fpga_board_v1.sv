// Testbench of fpga_board_v1: operates the board version like a person
// would, with bouncing push buttons and the switches, through two full
// rounds, and checks the state LEDs and the results on the LEDs against a
// software model.  Runs with a short debounce time.
module tb_fpga_board_v1;
  import lim_pkg::*;
  localparam int unsigned N = 4;
  localparam int unsigned M = 2;
  localparam int unsigned STABLE = 10;

  logic clk = 1'b0;
  logic por;
  logic [2*N-1:0] sw;
  logic btn_rst, btn_clk;
  logic [N-1:0] led;
  logic [5:0] state_led;
  int checks = 0, failures = 0;

  fpga_board_v1 #(.N(N), .M(M), .STABLE_CYCLES(STABLE)) dut (.*);

  always #5 clk = ~clk;

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

  // Press and release the CLK button (active low) with some bounce.
  task automatic step();
    repeat (2) begin
      btn_clk = 0; repeat (3) @(posedge clk);
      btn_clk = 1; repeat (2) @(posedge clk);
    end
    btn_clk = 0; repeat (STABLE + 8) @(posedge clk);
    btn_clk = 1; repeat (STABLE) @(posedge clk);
    #1;
  endtask

  function automatic logic [N-1:0] model(logic [N-1:0] ifm, logic [N-1:0] k);
    int ones = 0;
    for (int b = 0; b < N; b++)
      ones += (ifm[b] == k[b]);
    return N'(2 * ones - int'(N));
  endfunction

  task automatic expect_led(int s);
    check(state_led == 6'(1 << s), $sformatf("state_led %b want state %0d", state_led, s));
  endtask

  logic [N-1:0] words [M];
  logic [N-1:0] k;

  initial begin
    por = 1; sw = '0; btn_rst = 0; btn_clk = 1;
    repeat (3) @(posedge clk); #1 por = 0;
    // RST button press.
    btn_rst = 1; repeat (STABLE + 8) @(posedge clk);
    #1 expect_led(int'(V1_RESET));
    btn_rst = 0; repeat (STABLE) @(posedge clk); #1;
    expect_led(int'(V1_RESET));
    check(led == '0, "LEDs dark outside RESULTS");
    step(); expect_led(int'(V1_IDLE));
    for (int round = 0; round < 2; round++) begin
      step(); expect_led(int'(V1_FILLING_XNOR));
      k = N'($urandom);
      for (int i = 0; i < M; i++) begin
        words[i] = N'($urandom);
        sw = {words[i], k};
        step();
      end
      expect_led(int'(V1_PRE_POP_COMPUTING));
      step(); expect_led(int'(V1_POP_COMPUTING));
      repeat (N) step();
      expect_led(int'(V1_RESULTS));
      for (int i = 0; i < M; i++) begin
        check(led == model(words[i], k), $sformatf("led %b want %b", led, model(words[i], k)));
        step();
      end
      expect_led(int'(V1_IDLE));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
