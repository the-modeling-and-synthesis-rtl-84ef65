// cond_codes: condition-code logic of the PDP-11/40 and PDP-11/10
// data paths.
//
// Derives the four condition codes {N, Z, V, C} from an ALU result and the
// ALU's carry and overflow outputs.  The four bits travel through the 4-bit
// multiplexer in front of the PS register into PS[3:0].  The PDP-11 meaning of
// the bits (negative, zero, overflow, carry) is this library's choice; the
// source design only names the condition codes and their 4-bit path.
//
// Timing: combinational.
module cond_codes #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] y,
  input  logic         carry,
  input  logic         overflow,
  output logic [3:0]   cc        // {N, Z, V, C}
);

  assign cc = {y[W-1], ~|y, overflow, carry};

endmodule
