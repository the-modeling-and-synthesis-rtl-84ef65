// mux_prim: the multiplexer primitive, N inputs, one output, a binary
// address and an optional gating element.
//
// The address `sel` picks the active input; `en` is the gate: when it is low
// the output reads zero.  An address beyond the last input also reads zero.
// This is the element inserted in front of a "join node" (an input fed by
// more than one bus) when an initial bus allocation is refined.
//
// Timing: combinational.
module mux_prim #(
  parameter int unsigned W    = 16,
  parameter int unsigned N    = 2,
  parameter int unsigned SELW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][W-1:0] d,
  input  logic [SELW-1:0]     sel,
  input  logic                en,
  output logic [W-1:0]        y
);

  always_comb begin
    y = '0;
    for (int i = 0; i < N; i++)
      if (en && sel == SELW'(i)) y = d[i];
  end

endmodule
