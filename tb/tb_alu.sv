// tb_alu: self-checking test of the ALU: random operands for every operation,
// plus corner cases for carry and overflow, against a reference computed with
// wider integer arithmetic.
module tb_alu;
  import bus_pkg::*;
  localparam int W = 16;
  alu_op_e op;
  logic [W-1:0] a, b, y;
  logic carry, overflow;
  int checks = 0, failures = 0;

  alu #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input alu_op_e o, input logic [W-1:0] x, input logic [W-1:0] z);
    int sx, sz, s;
    logic [W-1:0] ey; logic ec, ev;
    op = o; a = x; b = z; #1;
    sx = int'(signed'(x)); sz = int'(signed'(z));
    ec = 0; ev = 0;
    case (o)
      ALU_ADD: begin ey = x + z; ec = (32'(x) + 32'(z)) > 32'hFFFF;
                     s = sx + sz; ev = (s > 32767) || (s < -32768); end
      ALU_SUB: begin ey = x - z; ec = x < z;
                     s = sx - sz; ev = (s > 32767) || (s < -32768); end
      ALU_AND: ey = x & z;
      ALU_OR:  ey = x | z;
      ALU_XOR: ey = x ^ z;
      ALU_BIC: ey = x & ~z;
      ALU_PASS_A: ey = x;
      default: ey = z;
    endcase
    checks++;
    if (y !== ey || carry !== ec || overflow !== ev) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h/%h c=%b/%b v=%b/%b", o.name(), x, z, y, ey, carry, ec, overflow, ev);
    end
  endtask

  initial begin
    for (int it = 0; it < 800; it++) run(alu_op_e'(it % 8), W'($urandom), W'($urandom));
    run(ALU_ADD, 16'h7FFF, 16'h0001);
    run(ALU_ADD, 16'hFFFF, 16'h0001);
    run(ALU_SUB, 16'h8000, 16'h0001);
    run(ALU_SUB, 16'h0000, 16'h0001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
