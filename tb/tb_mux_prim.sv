// tb_mux_prim: self-checking test of the multiplexer primitive: every address
// of a 5-input multiplexer, with the gate open and closed, and out-of-range
// addresses.
module tb_mux_prim;
  localparam int W = 16, N = 5, SELW = 3;
  logic [N-1:0][W-1:0] d;
  logic [SELW-1:0]     sel;
  logic                en;
  logic [W-1:0]        y;
  int checks = 0, failures = 0;

  mux_prim #(.W(W), .N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp_y;
    for (int it = 0; it < 300; it++) begin
      for (int i = 0; i < N; i++) d[i] = W'($urandom);
      sel = SELW'($urandom);
      en  = ($urandom % 5) != 0;
      #1;
      exp_y = (en && sel < N) ? d[sel] : '0;
      checks++;
      if (y !== exp_y) begin failures++; $display("FAIL sel=%0d en=%0b y=%h exp=%h", sel, en, y, exp_y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
