// Testbench of lim_xnor: sequential fill (top word first, stop_filling on
// the M-th write), XNOR outputs against a software model for random K, and
// addressed masked writes.
module tb_lim_xnor;
  localparam int unsigned N = 8;
  localparam int unsigned M = 5;
  localparam int unsigned AW = $clog2(M);

  logic clk = 1'b0;
  logic rst, rst_count, en_filling, stop_filling, wr_en;
  logic [AW-1:0] wr_word;
  logic [N-1:0] wr_mask, din, k;
  logic [M-1:0][N-1:0] out_xnor;
  logic [N-1:0] model [M];
  int checks = 0, failures = 0;

  lim_xnor #(.N(N), .M(M)) dut (.*);

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

  task automatic check_outputs();
    for (int t = 0; t < 4; t++) begin
      k = N'($urandom);
      #1;
      for (int w = 0; w < M; w++)
        check(out_xnor[w] == ~(model[w] ^ k), $sformatf("xnor word %0d", w));
    end
  endtask

  initial begin
    rst = 1; rst_count = 0; en_filling = 0; wr_en = 0; wr_word = '0;
    wr_mask = '0; din = '0; k = '0;
    @(posedge clk); #1 rst = 0;
    // Sequential fill, two rounds.
    for (int round = 0; round < 2; round++) begin
      for (int i = 0; i < M; i++) begin
        en_filling = 1;
        din = N'($urandom);
        model[M - 1 - i] = din;
        #1;
        check(stop_filling == (i == M - 1), $sformatf("stop_filling at write %0d", i));
        @(posedge clk); #1;
      end
      en_filling = 0;
      #1 check(!stop_filling, "stop_filling low when idle");
      check_outputs();
    end
    // Addressed, masked writes.
    for (int t = 0; t < 20; t++) begin
      wr_en   = 1;
      wr_word = AW'($urandom_range(M - 1));
      wr_mask = N'($urandom);
      din     = N'($urandom);
      model[wr_word] = (model[wr_word] & ~wr_mask) | (din & wr_mask);
      @(posedge clk); #1;
    end
    wr_en = 0;
    check_outputs();
    // rst_count restarts the fill at the top word.
    en_filling = 1; din = N'($urandom); model[M - 1] = din;
    @(posedge clk); #1;
    en_filling = 0; rst_count = 1;
    @(posedge clk); #1;
    rst_count = 0; en_filling = 1; din = N'($urandom); model[M - 1] = din;
    @(posedge clk); #1;
    en_filling = 0;
    check_outputs();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
