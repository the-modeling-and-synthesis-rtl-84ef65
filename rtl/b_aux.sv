// b_aux: the B.AUX unit of the PDP-11/40 and PDP-11/10
// data paths.
//
// B.AUX supplies the ALU's right operand with constants, a sign-extended byte
// and a byte-swapped word, all derived from the B register or the control
// word; the BMUX then chooses between B and B.AUX.  Which constants it holds
// and the exact operation set (bus_pkg::baux_op_e) are this library's
// choices: the source design only lists "constants, sign extender, and byte
// swapper".
//
// Timing: combinational.
module b_aux
  import bus_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  baux_op_e     op,
  input  logic [3:0]   const_val,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  localparam int unsigned HB = W / 2;

  always_comb begin
    unique case (op)
      BAUX_CONST: y = W'(const_val);
      BAUX_SXT:   y = {{(W-HB){b[HB-1]}}, b[HB-1:0]};
      BAUX_SWAB:  y = {b[HB-1:0], b[W-1:HB]};
      BAUX_HIGH:  y = W'(b[W-1:HB]);
      default:    y = '0;
    endcase
  end

endmodule
