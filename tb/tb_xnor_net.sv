// Testbench of xnor_net: a bus master writes IFMAP in DATA_W-bit pieces and
// K, launches the computation, waits for ready and reads every result with
// the four-phase handshakes, comparing against a software model.  N = 40
// (three pieces, the last one partial).  Also checks the N+1-cycle compute
// latency, that a read before RESULTS waits, that a write in RESULTS
// returns to FILLING_XNOR, and that a held request acts only once.
module tb_xnor_net;
  import lim_pkg::*;
  localparam int unsigned N = 40;
  localparam int unsigned M = 6;
  localparam int unsigned DW = 16;
  localparam int unsigned CH = (N + DW - 1) / DW;

  logic clk = 1'b0;
  logic rst, we_ifmap, we_k, re, enable_computing;
  logic [DW-1:0] addr, wdata, ofmap;
  logic ack_write, ack_read, ready;
  cu_state_e state;
  logic [N-1:0] ifm [M];
  logic [N-1:0] kw;
  int checks = 0, failures = 0;

  xnor_net #(.N(N), .M(M), .DATA_W(DW)) dut (.*);

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

  task automatic write(bit is_k, int a, logic [DW-1:0] d);
    addr = DW'(a); wdata = d;
    if (is_k) we_k = 1; else we_ifmap = 1;
    @(posedge clk); #1;
    while (!ack_write) begin @(posedge clk); #1; end
    // Holding the request longer must not write again.
    wdata = d + 1'b1;
    repeat (2) @(posedge clk); #1;
    we_k = 0; we_ifmap = 0;
    @(posedge clk); #1;
    check(!ack_write, "ack_write falls after request");
  endtask

  task automatic read(int a, output int v);
    addr = DW'(a); re = 1;
    @(posedge clk); #1;
    while (!ack_read) begin @(posedge clk); #1; end
    v = int'(signed'(ofmap));
    re = 0;
    @(posedge clk); #1;
    check(!ack_read, "ack_read falls after request");
  endtask

  function automatic int model(int w);
    int ones = 0;
    for (int b = 0; b < N; b++)
      ones += (ifm[w][b] == kw[b]);
    return 2 * ones - int'(N);
  endfunction

  task automatic fill_all();
    for (int w = 0; w < M; w++) begin
      ifm[w] = N'({$urandom, $urandom});
      if (w == 0) ifm[w] = ~kw;     // all zeros after XNOR: -N
      if (w == 1) ifm[w] = kw;      // all ones: +N
      for (int c = 0; c < CH; c++)
        write(0, w * CH + c, DW'(ifm[w] >> (c * DW)));
    end
  endtask

  initial begin
    int v, lat;
    rst = 1; we_ifmap = 0; we_k = 0; re = 0; enable_computing = 0;
    addr = '0; wdata = '0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int round = 0; round < 3; round++) begin
      kw = N'({$urandom, $urandom});
      for (int c = 0; c < CH; c++)
        write(1, c, DW'(kw >> (c * DW)));
      fill_all();
      check(state == CU_FILLING_XNOR && !ready, "filling, not ready");
      enable_computing = 1;
      @(posedge clk); #1 lat = 0;  // counted from the edge that samples the enable
      if (round == 0) begin
        // A read requested during computation waits for RESULTS.
        addr = DW'(2); re = 1;
      end
      while (!ready) begin @(posedge clk); #1 lat++; end
      check(lat == N + 1, $sformatf("compute latency %0d want %0d", lat, N + 1));
      enable_computing = 0;
      if (round == 0) begin
        while (!ack_read) begin @(posedge clk); #1; end
        check(int'(signed'(ofmap)) == model(2), "read made during compute");
        re = 0; @(posedge clk); #1;
      end
      for (int w = M - 1; w >= 0; w--) begin
        read(w, v);
        check(v == model(w), $sformatf("round %0d word %0d: %0d want %0d", round, w, v, model(w)));
      end
      // Still in RESULTS; a write returns to FILLING_XNOR.
      check(state == CU_RESULTS, "results held after reads");
    end
    // Change one piece of K in RESULTS, recompute without rewriting IFMAP.
    kw[DW-1:0] = ~kw[DW-1:0];
    write(1, 0, kw[DW-1:0]);
    check(state == CU_FILLING_XNOR, "write in RESULTS returns to FILLING_XNOR");
    enable_computing = 1;
    while (!ready) begin @(posedge clk); #1; end
    enable_computing = 0;
    for (int w = 0; w < M; w++) begin
      read(w, v);
      check(v == model(w), $sformatf("recompute word %0d: %0d want %0d", w, v, model(w)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
