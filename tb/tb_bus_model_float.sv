// tb_bus_model_float: floating connections of a canonical bus model.
//
// What it does: builds the one-bus model (N = 4) with three floating
// connections, i.e. wired-broadcast trees wired straight into multiplexers
// without a bus:
//   register 0 -> ALU left input, register 1 -> ALU right input,
//   ALU output -> register 2.
// Two more FLOAT bits are set that the model must ignore: register 3's tree
// into its own multiplexer, and the ALU output into the ALU left input.
// The floating arrows and the two forbidden connections follow the model's
// definition; which connections are made here is this test's choice.
//
// How it checks: with the operands in registers 0 and 1, "R0 op R1 -> R2 and
// OUT" must finish in one clock, against three clocks over the single bus,
// and leave the bus free for a transfer R3 -> X0 in the same clock.  Each
// connection that was not made must raise bad_sel when a loading register
// selects it.  Random ALU operations and data are repeated and every register
// is compared with expected values.  Prints TB_RESULT; a watchdog ends a hung
// run.
module tb_bus_model_float;
  import bus_pkg::*;
  localparam int W = 16, NBUS = 1, NR = 4, NREG = NR + 3;
  localparam int X0 = NR, X1 = NR + 1, OUTR = NR + 2, MUXA = NR + 3, MUXB = NR + 4;
  localparam int TREE_ALU = NR + 3, TALU = NBUS + TREE_ALU, EXT = NBUS + NR + 4, SW = 4;

  // FLOAT[tree][mux]
  function automatic logic [NR+3:0][NR+4:0] float_f();
    logic [NR+3:0][NR+4:0] f;
    f = '0;
    f[0][MUXA]     = 1'b1;  // R0 -> ALU left
    f[1][MUXB]     = 1'b1;  // R1 -> ALU right
    f[TREE_ALU][2] = 1'b1;  // ALU -> R2
    f[3][3]        = 1'b1;  // own input: ignored
    f[TREE_ALU][MUXA] = 1'b1;  // ALU loop: ignored
    return f;
  endfunction
  localparam logic [NR+3:0][NR+4:0] FL = float_f();

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

  one_bus_model #(.N(NR), .FLOAT(FL)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_float_ops = 0, n_parallel = 0;

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

  task automatic idle_ctrl();
    gate = '0; ld = '0; alu_op = ALU_ADD; ext_in = '0;
    for (int i = 0; i <= NR + 4; i++) sel[i] = SW'(EXT);
    sel[MUXA] = SW'(NBUS + X0); sel[MUXB] = SW'(NBUS + X1);
  endtask

  task automatic load(input int r, input logic [W-1:0] v);
    idle_ctrl(); ext_in = v; ld[r] = 1; sel[r] = SW'(EXT);
    @(posedge clk); #1;
    chk(q[r] == v, $sformatf("load reg %0d", r));
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time t0;
    logic [W-1:0] a, b, c, y;
    idle_ctrl();
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      a = W'($urandom); b = W'($urandom); c = W'($urandom);
      load(0, a); load(1, b); load(3, c);
      // R0 op R1 -> R2 and OUT through floating connections, R3 -> bus -> X0
      idle_ctrl();
      alu_op = alu_op_e'($urandom % 8);
      y = ref_alu(alu_op, a, b);
      sel[MUXA] = SW'(NBUS + 0); sel[MUXB] = SW'(NBUS + 1);
      sel[2] = SW'(TALU); ld[2] = 1;
      sel[OUTR] = SW'(TALU); ld[OUTR] = 1;
      gate[0][3] = 1; sel[X0] = SW'(0); ld[X0] = 1;
      t0 = $time;
      #1;
      chk(bad_sel == 1'b0, "floating connections are legal");
      chk(alu_y == y, $sformatf("alu %h exp %h", alu_y, y));
      chk(bus[0] == c && !bus_conflict[0], "bus carries R3 in the same clock");
      @(posedge clk); #1;
      chk(($time - t0) == 10, "R0 op R1 -> R2 in one clock");
      chk(q[2] == y && q[OUTR] == y, $sformatf("R2 %h OUT %h exp %h", q[2], q[OUTR], y));
      chk(q[X0] == c, "R3 -> X0 over the bus");
      n_float_ops++; n_parallel++;
    end
    // connections that were not made, or are forbidden, are flagged
    idle_ctrl(); sel[3] = SW'(NBUS + 3); ld[3] = 1; #1;
    chk(bad_sel == 1'b1, "own output into own multiplexer");
    idle_ctrl(); sel[2] = SW'(TALU); ld[2] = 1; sel[MUXA] = SW'(TALU); #1;
    chk(bad_sel == 1'b1, "ALU output into ALU input");
    idle_ctrl(); sel[1] = SW'(TALU); ld[1] = 1; #1;
    chk(bad_sel == 1'b1, "ALU output into a register not connected");
    idle_ctrl(); sel[OUTR] = SW'(TALU); ld[OUTR] = 1; sel[MUXA] = SW'(NBUS + 1); #1;
    chk(bad_sel == 1'b1, "R1 into ALU left input, not connected");
    idle_ctrl(); sel[OUTR] = SW'(TALU); ld[OUTR] = 1; sel[MUXB] = SW'(NBUS + 0); #1;
    chk(bad_sel == 1'b1, "R0 into ALU right input, not connected");
    idle_ctrl(); #1;
    chk(bad_sel == 1'b0, "idle");
    chk(n_float_ops > 0 && n_parallel > 0, "floating operation with a parallel bus transfer");
    $display("mechanisms: float_ops=%0d parallel_bus=%0d", n_float_ops, n_parallel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
