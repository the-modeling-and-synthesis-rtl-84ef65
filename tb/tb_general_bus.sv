// tb_general_bus: self-checking test of the general bus primitive.
// Drives random source data with random gate patterns (none, one, several
// open) and checks the bus value, the gated sink outputs, `active` and
// `conflict` against a reference computed here.
module tb_general_bus;
  localparam int W = 16, NSRC = 4, NSINK = 3;
  logic [NSRC-1:0][W-1:0]  src_data;
  logic [NSRC-1:0]         src_gate;
  logic [NSINK-1:0]        sink_gate;
  logic [W-1:0]            bus;
  logic [NSINK-1:0][W-1:0] sink_data;
  logic                    active, conflict;
  int checks = 0, failures = 0;

  general_bus #(.W(W), .NSRC(NSRC), .NSINK(NSINK)) dut (.*);

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
    logic [W-1:0] exp_bus;
    int n_open;
    for (int it = 0; it < 400; it++) begin
      for (int i = 0; i < NSRC; i++) src_data[i] = W'($urandom);
      // mostly single-source patterns, some idle and some conflicts
      case ($urandom % 4)
        0: src_gate = '0;
        1, 2: src_gate = NSRC'(1) << ($urandom % NSRC);
        default: src_gate = NSRC'($urandom);
      endcase
      sink_gate = NSINK'($urandom);
      #1;
      exp_bus = '0; n_open = 0;
      for (int i = 0; i < NSRC; i++) if (src_gate[i]) begin exp_bus |= src_data[i]; n_open++; end
      check(bus == exp_bus, $sformatf("bus %h exp %h", bus, exp_bus));
      check(active == (n_open > 0), "active");
      check(conflict == (n_open > 1), "conflict");
      for (int j = 0; j < NSINK; j++)
        check(sink_data[j] == (sink_gate[j] ? exp_bus : '0), $sformatf("sink %0d", j));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
