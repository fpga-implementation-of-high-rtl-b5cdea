// clk_counter: loadable down counter that times the controller's wait states.
//
// The main control module measures every DDR timing parameter (tRP, tMRD,
// tRFC, tRCD, CAS latency, burst and write-recovery time) by counting clock
// cycles.  A state machine pulses `load` with `load_val` when it enters a
// wait state; the counter then decrements once per clock and stops at zero,
// and `done` is high while the count is zero.  Loading N-1 therefore keeps
// `done` low for N-1 cycles, so a wait state that leaves on `done` lasts N
// cycles.  `load` has priority over counting.  Reset (asynchronous, active
// high) clears the count.  One instance serves each of the two FSMs.
module clk_counter #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         load,
  input  logic [W-1:0] load_val,
  output logic         done
);

  logic [W-1:0] count;

  always_ff @(posedge clk or posedge reset) begin
    if (reset)             count <= '0;
    else if (load)         count <= load_val;
    else if (count != '0)  count <= count - 1'b1;
  end

  assign done = (count == '0);

endmodule
