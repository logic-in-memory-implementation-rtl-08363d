// Control unit of the upgraded, bus-controlled XNOR-Net.
//
// States: RESET, FILLING_XNOR, PRE_POP_COMPUTING, POP_COMPUTING, RESULTS
// (the IDLE state of the first version is gone; its counter clearing now
// happens in FILLING_XNOR).
//   RESET             while rst is high
//   FILLING_XNOR      IFMAP and K may be written; waits for
//                     enable_computing
//   PRE_POP_COMPUTING 1 cycle, clears the ones counter and bit counter
//   POP_COMPUTING     N cycles (until stop_pop)
//   RESULTS           ready is high, OFMAP may be read and IFMAP / K
//                     written; a write request returns to FILLING_XNOR
// Allowed operations per state (write_ok, read_ok, compute only from
// FILLING_XNOR) follow the design description.  enable_computing sampled
// at a clock edge in FILLING_XNOR makes ready rise N+1 cycles later.
// Outputs are decoded from the state.
module xnor_cu
  import lim_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      enable_computing,
  input  logic      write_req,
  input  logic      stop_pop,
  output cu_state_e state,
  output logic      rst_count,
  output logic      en_pop,
  output logic      write_ok,
  output logic      read_ok,
  output logic      ready
);

  cu_state_e next;

  always_comb begin
    next = state;
    unique case (state)
      CU_RESET:             next = CU_FILLING_XNOR;
      CU_FILLING_XNOR:      if (enable_computing && !write_req) next = CU_PRE_POP_COMPUTING;
      CU_PRE_POP_COMPUTING: next = CU_POP_COMPUTING;
      CU_POP_COMPUTING:     if (stop_pop) next = CU_RESULTS;
      CU_RESULTS:           if (write_req) next = CU_FILLING_XNOR;
      default:              next = CU_RESET;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)
      state <= CU_RESET;
    else
      state <= next;
  end

  always_comb begin
    rst_count = (state == CU_RESET) || (state == CU_FILLING_XNOR) ||
                (state == CU_PRE_POP_COMPUTING);
    en_pop    = (state == CU_POP_COMPUTING);
    write_ok  = (state == CU_FILLING_XNOR) || (state == CU_RESULTS);
    read_ok   = (state == CU_RESULTS);
    ready     = (state == CU_RESULTS);
  end

endmodule
