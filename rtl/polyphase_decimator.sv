// polyphase_decimator: low-power serial-to-parallel decimator by M.
//
// A single sample stream is split into M parallel streams at 1/M of its rate, one per
// polyphase sub-filter. Rather than shifting every sample through a chain of registers
// at the full rate, each incoming sample is written once into one of M phase registers
// (reg_a .. reg_e), selected by the one-hot phase of a ring counter. When the first
// phase of the next block comes round, a common bank of M block registers (reg_0 ..
// reg_4) takes all M phase registers at once and holds them for the whole block period.
// Every register therefore toggles at 1/M of the input rate, which is where the power
// saving comes from.
//
// The decimator for the sinc stage runs with en = 1 on the 1 GHz clock; the one for the
// FIR stage sees one sample per 200 MHz period (en = the 1/5-rate enable). The separate
// phase-shifted clocks of the low-power circuit are realised here as clock enables on
// the master clock (phase[i] & en), a choice of this design that keeps one clock domain.
//
// Interface: din is sampled on rising clk edges with en = 1. phase is the ring-counter
// state (phase[0] = first slot of a block). blk[i] = x(Mk+i): blk[0] oldest, blk[M-1]
// newest. load is high during the edge on which blk takes a new block, so a downstream
// filter can advance its own block-rate registers on the same edge.
// Timing: sample x(Mk+M-1) arrives with phase[M-1]; the block appears on blk after the
// next edge with phase[0], i.e. one input period after its last sample.
module polyphase_decimator #(
  parameter int unsigned W = 4,
  parameter int unsigned M = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [M-1:0]        phase,
  input  logic [W-1:0]        din,
  output logic [M-1:0][W-1:0] blk,
  output logic                load
);

  logic [M-1:0][W-1:0] slot_q;   // reg_a .. reg_e

  assign load = en & phase[0];

  for (genvar i = 0; i < M; i++) begin : g_slot
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)
        slot_q[i] <= '0;
      else if (en && phase[i])
        slot_q[i] <= din;
    end
  end

  // reg_0 .. reg_4: all slots are taken together on the block edge
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      blk <= '0;
    else if (load)
      blk <= slot_q;
  end

endmodule
