// tb_b_aux: self-checking test of the B.AUX unit: constants, sign extension,
// byte swap and high byte, for random B values.
module tb_b_aux;
  import bus_pkg::*;
  localparam int W = 16;
  baux_op_e op;
  logic [3:0] const_val;
  logic [W-1:0] b, y, ey;
  int checks = 0, failures = 0;

  b_aux #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 400; it++) begin
      op = baux_op_e'(it % 4);
      const_val = 4'($urandom);
      b = W'($urandom);
      #1;
      case (op)
        BAUX_CONST: ey = {12'h000, const_val};
        BAUX_SXT:   ey = b[7] ? {8'hFF, b[7:0]} : {8'h00, b[7:0]};
        BAUX_SWAB:  ey = {b[7:0], b[15:8]};
        default:    ey = {8'h00, b[15:8]};
      endcase
      checks++;
      if (y !== ey) begin failures++; $display("FAIL op=%s b=%h y=%h exp=%h", op.name(), b, y, ey); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
