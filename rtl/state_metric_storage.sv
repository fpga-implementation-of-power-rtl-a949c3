// state_metric_storage: the register file of the 64 path metrics.
//
// Holds one path metric per trellis state and loads all of them at once from the ACS
// stage when load is high. Reset puts the decoder in the known start state 0: state 0
// gets metric 0 and every other state -INIT_PENALTY, so any path not starting in state
// 0 is handicapped. The storage itself follows the original architecture's block diagram; the reset
// values are this implementation's choice.
//
// Interface: synchronous active-high rst; pm_out is the registered content.
module state_metric_storage
  import viterbi_pkg::*;
#(
  parameter int unsigned INIT_PENALTY = 64
) (
  input  logic clk,
  input  logic rst,
  input  logic load,
  input  pm_t  pm_in  [NSTATES],
  output pm_t  pm_out [NSTATES]
);

  always_ff @(posedge clk) begin
    for (int s = 0; s < NSTATES; s++) begin
      if (rst)       pm_out[s] <= (s == 0) ? '0 : pm_t'(-INIT_PENALTY);
      else if (load) pm_out[s] <= pm_in[s];
    end
  end

endmodule
