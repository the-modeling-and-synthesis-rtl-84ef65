// multiplexing_bus: the multiplexing bus primitive, a bus with NSRC gated
// inputs and a single gated output.
//
// It differs from a multiplexer in its control: each input has its own gate
// (one enable per source, as with tri-state drivers) instead of a binary
// address, and the single output has a gate of its own.  At most one input
// gate may be open; more than one is flagged on `conflict`.  With no input
// gate open, or the output gate closed, the output reads zero.
//
// Timing: combinational.
module multiplexing_bus #(
  parameter int unsigned W    = 16,
  parameter int unsigned NSRC = 3
) (
  input  logic [NSRC-1:0][W-1:0] src_data,
  input  logic [NSRC-1:0]        src_gate,
  input  logic                   out_gate,
  output logic [W-1:0]           y,
  output logic                   conflict
);

  logic [W-1:0] bus;

  always_comb begin
    bus = '0;
    for (int i = 0; i < NSRC; i++)
      if (src_gate[i]) bus |= src_data[i];
  end

  assign y        = out_gate ? bus : '0;
  assign conflict = $countones(src_gate) > 1;

endmodule
