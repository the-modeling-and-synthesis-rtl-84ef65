// tb_cond_codes: self-checking test of the condition-code logic: N, Z, V, C
// for random results and for the zero and negative corner cases.
module tb_cond_codes;
  localparam int W = 16;
  logic [W-1:0] y;
  logic carry, overflow;
  logic [3:0] cc, ecc;
  int checks = 0, failures = 0;

  cond_codes #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 300; it++) begin
      y = (it % 7 == 0) ? '0 : (it % 11 == 0) ? 16'h8000 : W'($urandom);
      carry = $urandom % 2; overflow = $urandom % 2;
      #1;
      ecc[3] = $signed(y) < 0;
      ecc[2] = (y == 0);
      ecc[1] = overflow;
      ecc[0] = carry;
      checks++;
      if (cc !== ecc) begin failures++; $display("FAIL y=%h cc=%b exp=%b", y, cc, ecc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
