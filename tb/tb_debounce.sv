// Testbench of debounce: a bouncing press is ignored until the level has
// been stable for STABLE_CYCLES cycles; the output rises exactly
// STABLE_CYCLES + 3 cycles after the last edge of the press; a bounce inside
// the wait restarts it; release drops the output.  Both active levels.
module tb_debounce;
  localparam int unsigned STABLE = 20;

  logic clk = 1'b0;
  logic rst;
  logic btn_h, btn_l, out_h, out_l;
  int checks = 0, failures = 0;

  debounce #(.STABLE_CYCLES(STABLE), .ACTIVE_LEVEL(1'b1)) dut_h (
    .clk, .rst, .button (btn_h), .output_debounce (out_h));
  debounce #(.STABLE_CYCLES(STABLE), .ACTIVE_LEVEL(1'b0)) dut_l (
    .clk, .rst, .button (btn_l), .output_debounce (out_l));

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
      $display("FAIL: %s", what);
    end
  endtask

  // Drive the pressed level `p` (1 = pressed) on both buttons.
  task automatic drive(bit p);
    btn_h = p;
    btn_l = ~p;
  endtask

  task automatic press_and_measure(int bounces, int bounce_len);
    int cyc;
    for (int b = 0; b < bounces; b++) begin
      drive(1); repeat (bounce_len) @(posedge clk); #1;
      check(!out_h && !out_l, "no output while bouncing");
      drive(0); repeat (2) @(posedge clk); #1;
    end
    drive(1);
    cyc = 0;
    while (!out_h && cyc < 10 * STABLE) begin @(posedge clk); #1 cyc++; end
    check(cyc == STABLE + 3, $sformatf("rise after %0d cycles, want %0d", cyc, STABLE + 3));
    check(out_l == out_h, "both polarities agree");
    repeat (50) @(posedge clk); #1;
    check(out_h && out_l, "held while pressed");
    drive(0);
    repeat (3) @(posedge clk); #1;
    check(!out_h && !out_l, "released");
  endtask

  initial begin
    rst = 1; drive(0);
    repeat (3) @(posedge clk); #1 rst = 0;
    repeat (3) @(posedge clk); #1;
    check(!out_h && !out_l, "idle after reset");
    press_and_measure(0, 0);
    press_and_measure(3, 4);
    // Bounces nearly as long as the stable time still do not pass.
    press_and_measure(2, STABLE - 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
