// general_bus: the general bus primitive, a shared bus with NSRC gated
// sources and NSINK gated sinks.
//
// A general bus carries one transfer at a time: at most one source gate may be
// open, while any number of sink gates may be open together so that one value
// is broadcast to several destinations.  The tri-state drivers of a physical
// bus are modelled as an AND-OR network: a closed gate contributes zeros, so an
// idle bus reads as zero.  More than one open source gate is a bus conflict;
// it is reported on `conflict` (the bus then carries the OR of the drivers).
// A sink whose gate is closed sees zero on its `sink_data` port, standing for
// the high-impedance state of its receiver.
//
// Interface: src_data/src_gate per source, sink_gate per sink.
// Timing: purely combinational; the registers around the bus give the
// one-transfer-per-clock behaviour.
module general_bus #(
  parameter int unsigned W     = 16,
  parameter int unsigned NSRC  = 2,
  parameter int unsigned NSINK = 2
) (
  input  logic [NSRC-1:0][W-1:0]  src_data,
  input  logic [NSRC-1:0]         src_gate,
  input  logic [NSINK-1:0]        sink_gate,
  output logic [W-1:0]            bus,
  output logic [NSINK-1:0][W-1:0] sink_data,
  output logic                    active,    // some source gate is open
  output logic                    conflict   // more than one source gate is open
);

  always_comb begin
    bus = '0;
    for (int i = 0; i < NSRC; i++)
      bus |= src_data[i] & {W{src_gate[i]}};
  end

  always_comb begin
    for (int j = 0; j < NSINK; j++)
      sink_data[j] = bus & {W{sink_gate[j]}};
  end

  assign active   = |src_gate;
  assign conflict = $countones(src_gate) > 1;

endmodule
