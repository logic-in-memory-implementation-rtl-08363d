// Stand-alone board version of the XNOR-Net (no microcontroller), for
// stepping the 4 x 2 design by hand.
//
// The eight switches give the input: sw[7:4] is the IFMAP word written in
// each FILLING_XNOR step and sw[3:0] is K (which half is which is this
// design's own choice).  The four LEDs show the low bits of OFMAP, one
// result per RESULTS step.  Two push buttons drive RST (pressed = 1) and
// CLK (pressed = 0, pull-up wiring); both pass through the logic
// debouncer; outside RESULTS the LEDs are dark.  Instead of using the debounced CLK button as a clock, the
// design runs on the board clock and advances the XNOR-Net control unit by
// one step at each debounced press (a one-cycle clock enable); this is this
// design's own choice.  state_led has one output per control-unit state,
// bit 0 = RESET .. bit 5 = RESULTS, for LEDs on an external breadboard.
// por is a power-on reset for the debouncers, from the board.
module fpga_board_v1
  import lim_pkg::*;
#(
  parameter int unsigned N             = 4,
  parameter int unsigned M             = 2,
  parameter int unsigned STABLE_CYCLES = 100000
) (
  input  logic         clk,
  input  logic         por,
  input  logic [2*N-1:0] sw,
  input  logic         btn_rst,
  input  logic         btn_clk,
  output logic [N-1:0] led,
  output logic [5:0]   state_led
);

  localparam int unsigned OW = ofmap_width(N);

  logic rst_db, clk_db, clk_db_q, step;
  logic signed [OW-1:0] ofmap;
  logic                 ofmap_valid;
  cu_v1_state_e         state;

  debounce #(.STABLE_CYCLES(STABLE_CYCLES), .ACTIVE_LEVEL(1'b1)) u_db_rst (
    .clk, .rst (por), .button (btn_rst), .output_debounce (rst_db)
  );

  debounce #(.STABLE_CYCLES(STABLE_CYCLES), .ACTIVE_LEVEL(1'b0)) u_db_clk (
    .clk, .rst (por), .button (btn_clk), .output_debounce (clk_db)
  );

  // One step per debounced press.
  always_ff @(posedge clk) begin
    if (por)
      clk_db_q <= 1'b0;
    else
      clk_db_q <= clk_db;
  end

  assign step = clk_db && !clk_db_q;

  xnor_net_v1 #(.N(N), .M(M)) u_net (
    .clk,
    .ce    (step),
    .rst   (por || rst_db),
    .ifmap (sw[2*N-1:N]),
    .k     (sw[N-1:0]),
    .ofmap,
    .ofmap_valid,
    .state
  );

  // LEDs show a result only in the RESULTS steps.
  assign led = ofmap_valid ? N'(ofmap) : '0;

  always_comb begin
    state_led = '0;
    state_led[state] = 1'b1;
  end

endmodule
