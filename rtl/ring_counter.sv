// ring_counter: divide-by-N clock divider built as a one-hot ring counter.
//
// Reset loads the state 1000..0 and every enabled clock edge rotates the single '1' one
// place, so each of the N outputs is high for one input period out of N. These N
// phase-shifted 1/N-rate phases select which decimator register captures the current
// sample. A ring counter is used because its feedback path is a single wire between
// flip-flops, which is what lets the first divider run at 1 GHz; a binary counter has
// about three gate delays of feedback logic.
//
// Interface: clk, rst_n (asynchronous, active low, from reset_sync), en (input-rate
// enable: 1 for the 1 GHz divider, the 200 MHz enable for the second divider),
// phase[N-1:0] (one-hot; phase[0] is high in the first sample slot of a block).
// Timing: after reset phase[0] is high; phase[i] is high after i enabled edges.
// The phase numbering is this design's choice.
module ring_counter #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [N-1:0] phase
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      phase <= N'(1);
    else if (en)
      phase <= {phase[N-2:0], phase[N-1]};
  end

  // The ring must always hold exactly one token once out of reset.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(phase));

endmodule
