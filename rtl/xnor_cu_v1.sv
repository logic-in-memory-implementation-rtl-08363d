// Control unit of the first (free-running) XNOR-Net.
//
// Six states, stepped once per cycle in which `ce` is high:
//   RESET             while rst is high, everything cleared
//   IDLE              1 cycle, clears the counters
//   FILLING_XNOR      M cycles, one IFMAP word written per cycle
//   PRE_POP_COMPUTING 1 cycle, clears the ones counter and the bit counter
//   POP_COMPUTING     N cycles, one bit of every word sent to the counter
//   RESULTS           M cycles, one result per cycle, then back to IDLE
// Phase ends come from the counters of the datapath (stop_filling,
// stop_pop, stop_results).  No input other than reset is needed: once
// started the flow runs on its own, so the source of IFMAP and the reader
// of the results must follow the same cycle count.  Outputs are decoded
// from the state (Moore).  The state list and durations follow the design
// description; `ce` (used to step the machine from a push button) is this
// design's own.
module xnor_cu_v1
  import lim_pkg::*;
(
  input  logic         clk,
  input  logic         ce,
  input  logic         rst,
  input  logic         stop_filling,
  input  logic         stop_pop,
  input  logic         stop_results,
  output logic         rst_count,
  output logic         en_filling,
  output logic         en_pop,
  output logic         en_results,
  output cu_v1_state_e state
);

  cu_v1_state_e next;

  always_comb begin
    next = state;
    unique case (state)
      V1_RESET:             next = V1_IDLE;
      V1_IDLE:              next = V1_FILLING_XNOR;
      V1_FILLING_XNOR:      if (stop_filling) next = V1_PRE_POP_COMPUTING;
      V1_PRE_POP_COMPUTING: next = V1_POP_COMPUTING;
      V1_POP_COMPUTING:     if (stop_pop) next = V1_RESULTS;
      V1_RESULTS:           if (stop_results) next = V1_IDLE;
      default:              next = V1_RESET;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)
      state <= V1_RESET;
    else if (ce)
      state <= next;
  end

  always_comb begin
    rst_count  = (state == V1_RESET) || (state == V1_IDLE) || (state == V1_PRE_POP_COMPUTING);
    en_filling = ce && (state == V1_FILLING_XNOR);
    en_pop     = ce && (state == V1_POP_COMPUTING);
    en_results = ce && (state == V1_RESULTS);
  end

endmodule
