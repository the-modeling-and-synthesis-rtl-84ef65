// tb_bus_reg: self-checking test of the storage element: reset value, load on
// `ld`, hold otherwise, one clock of latency.
module tb_bus_reg;
  localparam int W = 16;
  localparam logic [W-1:0] RV = 16'hA5C3;
  logic clk = 0, rst_n, ld;
  logic [W-1:0] d, q, model;
  int checks = 0, failures = 0;

  bus_reg #(.W(W), .RESET_VAL(RV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; ld = 0; d = '0;
    @(posedge clk); #1;
    checks++; if (q !== RV) begin failures++; $display("FAIL reset q=%h", q); end
    model = RV;
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      ld = $urandom % 2;
      d  = W'($urandom);
      @(posedge clk); #1;
      if (ld) model = d;
      checks++;
      if (q !== model) begin failures++; $display("FAIL it=%0d q=%h exp=%h", it, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
