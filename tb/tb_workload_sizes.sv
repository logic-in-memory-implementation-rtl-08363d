// Workload testbench: the XNOR-Net at the three measured word lengths
// (32, 64 and 128 bits), each at the smallest measured depth (4 words) and
// at a larger one (the full 32 x 256 size runs in tb_lim_top), each filled
// with random IFMAP and K, computed and read back through the memory-like
// interface.  Checks every result and that the compute time is N+1 cycles
// for every depth: all words are processed at once.
module tb_workload_sizes;
  import lim_pkg::*;
  localparam int unsigned DW = 16;

  logic clk = 1'b0;
  int checks = 0, failures = 0;
  int done = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  `define TB_WL_RUN(NN, MM, TAG) \
  begin : TAG \
    localparam int unsigned CH = (NN + DW - 1) / DW; \
    logic rst, we_ifmap, we_k, re, enable_computing; \
    logic [DW-1:0] addr, wdata, ofmap; \
    logic ack_write, ack_read, ready; \
    cu_state_e state; \
    logic [NN-1:0] ifm [MM]; \
    logic [NN-1:0] kw; \
    xnor_net #(.N(NN), .M(MM), .DATA_W(DW)) dut ( \
      .clk, .rst, .we_ifmap, .we_k, .re, .enable_computing, .addr, .wdata, \
      .ofmap, .ack_write, .ack_read, .ready, .state); \
    function automatic int model(int w); \
      int ones = 0; \
      for (int b = 0; b < NN; b++) ones += (ifm[w][b] == kw[b]); \
      return 2 * ones - int'(NN); \
    endfunction \
    task automatic wr(bit is_k, int a, logic [DW-1:0] d); \
      addr = DW'(a); wdata = d; \
      if (is_k) we_k = 1; else we_ifmap = 1; \
      do @(posedge clk); while (!ack_write); \
      #1 we_k = 0; we_ifmap = 0; \
      do @(posedge clk); while (ack_write); \
      #1; \
    endtask \
    initial begin \
      int lat; \
      rst = 1; we_ifmap = 0; we_k = 0; re = 0; enable_computing = 0; \
      addr = '0; wdata = '0; \
      repeat (2) @(posedge clk); #1 rst = 0; \
      kw = NN'({$urandom, $urandom, $urandom, $urandom}); \
      for (int c = 0; c < CH; c++) wr(1, c, DW'(kw >> (c * DW))); \
      for (int w = 0; w < MM; w++) begin \
        ifm[w] = NN'({$urandom, $urandom, $urandom, $urandom}); \
        for (int c = 0; c < CH; c++) wr(0, w * CH + c, DW'(ifm[w] >> (c * DW))); \
      end \
      enable_computing = 1; \
      @(posedge clk); #1 lat = 0; \
      while (!ready) begin @(posedge clk); #1 lat++; end \
      enable_computing = 0; \
      check(lat == NN + 1, $sformatf("%0dx%0d compute %0d cycles", NN, MM, lat)); \
      for (int w = 0; w < MM; w++) begin \
        addr = DW'(w); re = 1; \
        do @(posedge clk); while (!ack_read); \
        #1 check(int'(signed'(ofmap)) == model(w), \
                 $sformatf("%0dx%0d word %0d: %0d want %0d", NN, MM, w, signed'(ofmap), model(w))); \
        re = 0; \
        do @(posedge clk); while (ack_read); \
        #1; \
      end \
      $display("%0d-bit x %0d words: compute %0d cycles", NN, MM, lat); \
      done++; \
    end \
  end

  `TB_WL_RUN(32, 4, g_32x4)
  `TB_WL_RUN(32, 32, g_32x32)
  `TB_WL_RUN(64, 4, g_64x4)
  `TB_WL_RUN(64, 16, g_64x16)
  `TB_WL_RUN(128, 4, g_128x4)
  `TB_WL_RUN(128, 8, g_128x8)

  initial begin
    wait (done == 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
