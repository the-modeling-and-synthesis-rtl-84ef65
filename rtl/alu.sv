// alu: the centralized arithmetic logic unit of a bus-style data path.
//
// Two W-bit operands, one W-bit result, with carry and two's-complement
// overflow for ADD and SUB (SUB's carry is the borrow).  The operation set
// (see bus_pkg::alu_op_e) is this library's choice; the source design only
// says that the ALU holds the binary arithmetic and boolean operators.
//
// Timing: combinational.
module alu
  import bus_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  alu_op_e      op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y,
  output logic         carry,
  output logic         overflow
);

  logic [W:0] sum;

  always_comb begin
    sum      = '0;
    y        = '0;
    carry    = 1'b0;
    overflow = 1'b0;
    unique case (op)
      ALU_ADD: begin
        sum      = {1'b0, a} + {1'b0, b};
        y        = sum[W-1:0];
        carry    = sum[W];
        overflow = (a[W-1] == b[W-1]) && (y[W-1] != a[W-1]);
      end
      ALU_SUB: begin
        sum      = {1'b0, a} - {1'b0, b};
        y        = sum[W-1:0];
        carry    = sum[W];
        overflow = (a[W-1] != b[W-1]) && (y[W-1] != a[W-1]);
      end
      ALU_AND:    y = a & b;
      ALU_OR:     y = a | b;
      ALU_XOR:    y = a ^ b;
      ALU_BIC:    y = a & ~b;
      ALU_PASS_A: y = a;
      ALU_PASS_B: y = b;
      default:    y = '0;
    endcase
  end

endmodule
