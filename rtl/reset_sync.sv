// reset_sync: reset synchronizer for the clock dividers.
//
// An active-low asynchronous reset is asserted at once and released only after it has
// passed through STAGES flip-flops of the local clock, so the ring counters leave reset
// on a clock edge and never on a metastable one. The divider needs one synchronizer on
// the 1 GHz clock and one on the 200 MHz clock. Here both stages run on the one master
// clock; the 200 MHz instance uses en (the 1/5-rate clock enable) in place of its own
// clock, so its release takes STAGES enabled edges.
//
// Interface: clk, arst_n (asynchronous, active low), en (advance enable), rst_n_out
// (active-low reset, asserted asynchronously, released synchronously).
// Timing: rst_n_out rises on the STAGES-th enabled rising edge after arst_n rises.
// The two-flop depth is this design's choice; the circuit is the standard one.
module reset_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic arst_n,
  input  logic en,
  output logic rst_n_out
);

  logic [STAGES-1:0] sync_q;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n)
      sync_q <= '0;
    else if (en)
      sync_q <= {sync_q[STAGES-2:0], 1'b1};
  end

  assign rst_n_out = sync_q[STAGES-1];

endmodule
