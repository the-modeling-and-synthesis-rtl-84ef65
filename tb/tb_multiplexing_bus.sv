// tb_multiplexing_bus: self-checking test of the multiplexing bus primitive.
// Random inputs and gate patterns; checks the output against the one open
// input (or zero), the output gate, and the conflict flag.
module tb_multiplexing_bus;
  localparam int W = 16, NSRC = 3;
  logic [NSRC-1:0][W-1:0] src_data;
  logic [NSRC-1:0]        src_gate;
  logic                   out_gate;
  logic [W-1:0]           y;
  logic                   conflict;
  int checks = 0, failures = 0;

  multiplexing_bus #(.W(W), .NSRC(NSRC)) dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp_y;
    int n_open;
    for (int it = 0; it < 400; it++) begin
      for (int i = 0; i < NSRC; i++) src_data[i] = W'($urandom);
      src_gate = ($urandom % 3 == 0) ? NSRC'($urandom) : NSRC'(1) << ($urandom % NSRC);
      out_gate = ($urandom % 4) != 0;
      #1;
      exp_y = '0; n_open = 0;
      for (int i = 0; i < NSRC; i++) if (src_gate[i]) begin exp_y |= src_data[i]; n_open++; end
      if (!out_gate) exp_y = '0;
      check(y == exp_y, $sformatf("y %h exp %h", y, exp_y));
      check(conflict == (n_open > 1), "conflict");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
