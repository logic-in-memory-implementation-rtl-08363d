// Push-button debouncer in logic.
//
// A mechanical button bounces for a while when pressed.  This block passes
// the press on only once the button level has stayed at its active value
// for STABLE_CYCLES consecutive clock cycles.  It is a three-state control
// unit driving an external counter:
//   IDLE     button not active: counter held at 0, output 0
//   WAIT     button active: the counter runs; any return to the inactive
//            level goes straight back to IDLE
//   STABLING counter finished: the button is stable, output 1 for as long
//            as the button stays active; release goes back to IDLE
// The button level is first passed through two flip-flops (this design's
// own, the raw pin is asynchronous).  ACTIVE_LEVEL is the pin level of a
// pressed button (1 for a pull-down circuit, 0 for a pull-up one).  The
// output rises STABLE_CYCLES + 3 cycles after the last bounce of a press
// and falls 3 cycles after release (release is not debounced).  The stable
// time is not given by the design description; 100000 cycles is 10 ms at
// 10 MHz.
module debounce #(
  parameter int unsigned STABLE_CYCLES = 100000,
  parameter bit          ACTIVE_LEVEL  = 1'b1
) (
  input  logic clk,
  input  logic rst,
  input  logic button,
  output logic output_debounce
);

  typedef enum logic [1:0] {
    DB_IDLE     = 2'd0,
    DB_WAIT     = 2'd1,
    DB_STABLING = 2'd2
  } db_state_e;

  localparam int unsigned CW = $clog2(STABLE_CYCLES + 1);

  db_state_e     state;
  logic [1:0]    sync_q;
  logic          activated;
  logic          is_stable;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst)
      sync_q <= {2{~ACTIVE_LEVEL}};
    else
      sync_q <= {sync_q[0], button};
  end

  assign activated = (sync_q[1] == ACTIVE_LEVEL);

  // External counter: runs only in WAIT.
  assign is_stable = (cnt == CW'(STABLE_CYCLES - 1));

  always_ff @(posedge clk) begin
    if (rst || state != DB_WAIT)
      cnt <= '0;
    else if (!is_stable)
      cnt <= cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= DB_IDLE;
    end else begin
      unique case (state)
        DB_IDLE:     if (activated) state <= DB_WAIT;
        DB_WAIT:     if (!activated) state <= DB_IDLE;
                     else if (is_stable) state <= DB_STABLING;
        DB_STABLING: if (!activated) state <= DB_IDLE;
        default:     state <= DB_IDLE;
      endcase
    end
  end

  assign output_debounce = (state == DB_STABLING);

endmodule
