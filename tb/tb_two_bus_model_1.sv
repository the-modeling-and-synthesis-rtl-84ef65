// tb_two_bus_model_1: self-checking test of the two_bus_model_1.
//
// The test keeps its own statement of which buses each register drives
// (OUTB) and reads (INB), taken from the model's drawing, and checks the
// model against a cycle-accurate reference: random legal transfers (one
// source per bus, any number of sinks, ALU operations into the output
// register) with all registers and buses compared every clock.  A directed
// part measures the input data set-up time of a binary operation whose
// operands start in registers 0 and 2: the operands reach the ALU's
// working registers in 1 clock(s) and the result is in the output
// register after 2 clocks.  It also counts cycles with several buses busy
// and broadcasts, and checks that unconnected multiplexer inputs are flagged.
module tb_two_bus_model_1;
  import bus_pkg::*;
  localparam int W = 16, NBUS = 2, NR = 4, NREG = NR + 3;
  localparam int X0 = NR, X1 = NR + 1, OUTR = NR + 2, MUXA = NR + 3, MUXB = NR + 4;
  localparam int TALU = NBUS + NR + 3, EXT = NBUS + NR + 4, SW = 4;

  logic clk = 0, rst_n;
  logic [NBUS-1:0][NREG-1:0] gate;
  logic [NR+4:0][SW-1:0] sel;
  logic [NREG-1:0] ld;
  alu_op_e alu_op;
  logic [W-1:0] ext_in, alu_y;
  logic [NBUS-1:0][W-1:0] bus;
  logic [NBUS-1:0] bus_conflict;
  logic [NREG-1:0][W-1:0] q;
  logic bad_sel;

  two_bus_model_1 #(.N1(2), .N2(2)) dut (.*);

  always #5 clk = ~clk;

  // Buses driven (OUTB) and read (INB) by register r, as drawn for this model.
  function automatic logic [NBUS-1:0] OUTB(int r);
    if (r < 2 || r == X0) return 2'b01;
    if (r < X1 + 1) return 2'b10;
    return 2'b11;
  endfunction
  function automatic logic [NBUS-1:0] INB(int r);
    if (r < 2 || r == X0) return 2'b01;
    if (r < X1 + 1) return 2'b10;
    return 2'b11;
  endfunction

  int checks = 0, failures = 0, n_multi = 0, n_bcast = 0, n_alu = 0;
  logic [W-1:0] m [NREG];

  function automatic logic [W-1:0] ref_alu(alu_op_e op, logic [W-1:0] x, logic [W-1:0] z);
    case (op)
      ALU_ADD: return x + z;
      ALU_SUB: return x - z;
      ALU_AND: return x & z;
      ALU_OR:  return x | z;
      ALU_XOR: return x ^ z;
      ALU_BIC: return x & ~z;
      ALU_PASS_A: return x;
      default: return z;
    endcase
  endfunction

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t %s", $time, what); end
  endtask

  // One clock with the current gate/sel/ld/alu_op/ext_in; checks buses and
  // registers against the reference.
  task automatic step();
    logic [NBUS-1:0][W-1:0] eb; logic [W-1:0] y; logic [W-1:0] nm [NREG];
    int busy, sinks;
    #1;
    eb = '0; busy = 0;
    for (int b = 0; b < NBUS; b++) begin
      for (int r = 0; r < NREG; r++) if (gate[b][r] && OUTB(r)[b]) eb[b] |= m[r];
      if (|gate[b]) busy++;
      chk(bus[b] == eb[b], $sformatf("bus %0d %h exp %h", b, bus[b], eb[b]));
    end
    y = ref_alu(alu_op, m[X0], m[X1]);
    chk(bad_sel == 1'b0, "bad_sel on a legal cycle");
    sinks = 0;
    for (int r = 0; r < NREG; r++) begin
      nm[r] = m[r];
      if (ld[r]) begin
        if (sel[r] < NBUS)       nm[r] = eb[sel[r]];
        else if (sel[r] == EXT)  nm[r] = ext_in;
        else if (sel[r] == TALU) nm[r] = y;
        if (sel[r] < NBUS) sinks++;
      end
    end
    if (busy > 1) n_multi++;
    if (sinks > busy && busy > 0) n_bcast++;
    @(posedge clk);
    for (int r = 0; r < NREG; r++) m[r] = nm[r];
    #1;
    for (int r = 0; r < NREG; r++) chk(q[r] == m[r], $sformatf("reg %0d %h exp %h", r, q[r], m[r]));
    gate = '0; ld = '0;
  endtask

  task automatic idle_ctrl();
    gate = '0; ld = '0; alu_op = ALU_ADD; ext_in = '0;
    for (int i = 0; i <= NR + 4; i++) sel[i] = SW'(EXT);
    sel[MUXA] = SW'(NBUS + X0); sel[MUXB] = SW'(NBUS + X1);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time t0;
    idle_ctrl();
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 0; r < NREG; r++) m[r] = '0;
    // load every register from the external input
    for (int r = 0; r < NREG; r++) begin
      ext_in = 16'h1111 * 16'(r + 1); ld[r] = 1; sel[r] = SW'(EXT); step();
    end
    // input data set-up time: R0 op R2 -> OUT
    t0 = $time;
    if (2 == 2) begin
      gate[0][0] = 1; ld[X0] = 1; sel[X0] = SW'(0);
      gate[1][2] = 1; ld[X1] = 1; sel[X1] = SW'(1);
      step();
    end else begin
      gate[0][0] = 1; ld[X0] = 1; sel[X0] = SW'(0); step();
      gate[1][2] = 1; ld[X1] = 1; sel[X1] = SW'(1); step();
    end
    alu_op = ALU_SUB; ld[OUTR] = 1; sel[OUTR] = SW'(TALU); step();
    chk(q[OUTR] == 16'h1111 * 16'(0 + 1) - 16'h1111 * 16'(2 + 1), "operation result");
    chk(($time - t0) == 2 * 10, $sformatf("operation took %0d clocks, expected 2", ($time - t0) / 10));
    // a multiplexer input that is not connected is flagged
    idle_ctrl(); ld[X0] = 1; sel[X0] = SW'(NBUS + X0); #1;
    chk(bad_sel == 1'b1, "own output selected");
    for (int b = 0; b < NBUS; b++) if (!INB(X0)[b]) begin
      sel[X0] = SW'(b); #1; chk(bad_sel == 1'b1, $sformatf("X0 from unconnected bus %0d", b));
    end
    idle_ctrl();
    // random legal cycles
    for (int it = 0; it < 3000; it++) begin
      idle_ctrl();
      alu_op = alu_op_e'($urandom % 8);
      ext_in = W'($urandom);
      for (int b = 0; b < NBUS; b++) if ($urandom % 4 != 0) begin
        int r; r = $urandom % NREG;
        if (OUTB(r)[b]) gate[b][r] = 1;
      end
      for (int r = 0; r < NREG; r++) begin
        int k; k = $urandom % 5;
        if (k == 0) begin ld[r] = 1; sel[r] = SW'(EXT); end
        else if (k == 1 && r == OUTR) begin ld[r] = 1; sel[r] = SW'(TALU); n_alu++; end
        else if (k >= 2) begin
          int b; b = $urandom % NBUS;
          if (INB(r)[b] && |gate[b]) begin ld[r] = 1; sel[r] = SW'(b); end
        end
      end
      step();
    end
    if (NBUS > 1) chk(n_multi > 0, "several buses busy in one clock");
    chk(n_bcast > 0, "broadcast to several sinks");
    chk(n_alu > 0, "ALU result stored");
    $display("mechanisms: multi_bus=%0d broadcast=%0d alu=%0d", n_multi, n_bcast, n_alu);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
