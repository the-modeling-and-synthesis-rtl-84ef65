// tb_alu_input_configs: input data set-up time of the five ALU input
// configurations.
//
// What it does: builds the five arrangements of buses and working registers
// in front of a central ALU from the canonical-model core, each with two
// general registers R0 and R1 holding the operands:
//   (a) one bus, a working register in front of each ALU input;
//   (b) one bus, left input straight from the bus, right input registered;
//   (c) two buses, a working register on each;
//   (d) two buses, left input straight from bus 0, right input registered;
//   (e) two buses, each ALU input straight from its bus.
// The configurations and their expected set-up times (3, 2, 2, 2 and 1 time
// units) follow the document; the register count, the operand values and the
// choice of ALU operation are this test's.
//
// How it checks: for each configuration the operation R0 op R1 -> OUT is run
// with the fewest clocks the structure allows, with the transfers in each
// clock written out here.  The test checks the result and that the clock
// count from operands in R0/R1 to the result in the output register equals
// the set-up time above (the last clock also performs the operation).  No
// clock may open two sources on a bus or select an unconnected input.
// Repeated with random operands and operations.  Prints TB_RESULT; a watchdog
// ends a hung run.
module tb_alu_input_configs;
  import bus_pkg::*;
  localparam int W = 16, NR = 2, NREG = NR + 3, SW = 4, NCFG = 5, REPS = 50;
  localparam int R0 = 0, R1 = 1, X0 = NR, X1 = NR + 1, OUTR = NR + 2, MUXA = NR + 3, MUXB = NR + 4;
  localparam int TREE_ALU = NR + 3;
  localparam int EXPECT [NCFG] = '{3, 2, 2, 2, 1};

  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int measured [NCFG];
  logic done [NCFG];

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t %s", $time, what); end
  endtask

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

  function automatic int nbus_of(int c); return (c < 2) ? 1 : 2; endfunction
  function automatic bit a_direct(int c); return c == 1 || c == 3 || c == 4; endfunction
  function automatic bit b_direct(int c); return c == 4; endfunction

  // Gating elements of configuration c, bit r * nbus + b: R0 drives the left
  // operand's bus, R1 the right one's, OUT drives every bus.
  function automatic logic [2*(NR+3)-1:0] gate_out_flat(int c);
    logic [2*(NR+3)-1:0] g; int n;
    n = nbus_of(c); g = '0;
    g[R0 * n + 0] = 1'b1;
    g[R1 * n + n - 1] = 1'b1;
    for (int b = 0; b < n; b++) g[OUTR * n + b] = 1'b1;
    return g;
  endfunction

  // Bus inputs of configuration c, bit m * nbus + b: R0, R1 and OUT read
  // every bus; each working register reads its operand's bus unless that
  // ALU input is connected straight to the bus.
  function automatic logic [2*(NR+5)-1:0] bus_in_flat(int c);
    logic [2*(NR+5)-1:0] v; int n;
    n = nbus_of(c); v = '0;
    for (int b = 0; b < n; b++) begin
      v[R0 * n + b] = 1'b1; v[R1 * n + b] = 1'b1; v[OUTR * n + b] = 1'b1;
    end
    v[X0 * n + 0]       = !a_direct(c);
    v[X1 * n + n - 1]   = !b_direct(c);
    v[MUXA * n + 0]     = a_direct(c);
    v[MUXB * n + n - 1] = b_direct(c);
    return v;
  endfunction

  for (genvar C = 0; C < NCFG; C++) begin : g_cfg
    localparam int NBUS = nbus_of(C);
    localparam bit A_DIRECT = a_direct(C);
    localparam bit B_DIRECT = b_direct(C);
    localparam int EXT = NBUS + NR + 4, TALU = NBUS + TREE_ALU;
    // bus carrying the left and right operand
    localparam int BA = 0, BB = NBUS - 1;

    localparam logic [2*(NR+3)-1:0] GOF = gate_out_flat(C);
    localparam logic [2*(NR+5)-1:0] BIF = bus_in_flat(C);
    localparam logic [NR+2:0][NBUS-1:0] GATE_OUT = GOF[(NR+3)*NBUS-1:0];
    localparam logic [NR+4:0][NBUS-1:0] BUS_IN = BIF[(NR+5)*NBUS-1:0];

    logic [NBUS-1:0][NREG-1:0] gate;
    logic [NR+4:0][SW-1:0] sel;
    logic [NREG-1:0] ld;
    alu_op_e alu_op;
    logic [W-1:0] ext_in, alu_y;
    logic [NBUS-1:0][W-1:0] bus;
    logic [NBUS-1:0] bus_conflict;
    logic [NREG-1:0][W-1:0] q;
    logic bad_sel;

    bus_model_core #(
      .W(W), .NR(NR), .NBUS(NBUS), .GATE_OUT(GATE_OUT), .BUS_IN(BUS_IN), .SW(SW)
    ) u_core (
      .clk, .rst_n, .gate, .sel, .ld, .alu_op, .ext_in, .bus, .bus_conflict, .q, .alu_y, .bad_sel
    );

    task automatic idle_ctrl();
      gate = '0; ld = '0; ext_in = '0;
      for (int i = 0; i <= NR + 4; i++) sel[i] = SW'(EXT);
      sel[MUXA] = SW'(NBUS + X0); sel[MUXB] = SW'(NBUS + X1);
    endtask

    task automatic clock();
      #1;
      chk(!bad_sel, $sformatf("config %0d: unconnected input selected", C));
      chk(!(|bus_conflict), $sformatf("config %0d: bus conflict", C));
      @(posedge clk); #1;
      idle_ctrl();
    endtask

    initial begin
      time t0;
      logic [W-1:0] a, b, y;
      alu_op_e op;
      done[C] = 0;
      alu_op = ALU_ADD;
      idle_ctrl();
      @(posedge rst_n); #1;
      for (int it = 0; it < REPS; it++) begin
        a = W'($urandom); b = W'($urandom);
        op = alu_op_e'($urandom % 8);
        y = ref_alu(op, a, b);
        ext_in = a; ld[R0] = 1; clock();
        ext_in = b; ld[R1] = 1; clock();
        chk(q[R0] == a && q[R1] == b, $sformatf("config %0d: operands loaded", C));
        t0 = $time;
        alu_op = op;
        // operands into the working registers where there are any
        if (C == 0) begin
          gate[BA][R0] = 1; ld[X0] = 1; sel[X0] = SW'(BA); clock();
          gate[BB][R1] = 1; ld[X1] = 1; sel[X1] = SW'(BB); clock();
        end else if (C == 2) begin
          gate[BA][R0] = 1; ld[X0] = 1; sel[X0] = SW'(BA);
          gate[BB][R1] = 1; ld[X1] = 1; sel[X1] = SW'(BB); clock();
        end else if (C == 1 || C == 3) begin
          gate[BB][R1] = 1; ld[X1] = 1; sel[X1] = SW'(BB); clock();
        end
        // last clock: direct inputs from their buses, operation into OUT
        if (A_DIRECT) begin gate[BA][R0] = 1; sel[MUXA] = SW'(BA); end
        if (B_DIRECT) begin gate[BB][R1] = 1; sel[MUXB] = SW'(BB); end
        ld[OUTR] = 1; sel[OUTR] = SW'(TALU);
        #1 chk(alu_y == y, $sformatf("config %0d: ALU %h exp %h", C, alu_y, y));
        clock();
        chk(q[OUTR] == y, $sformatf("config %0d: OUT %h exp %h", C, q[OUTR], y));
        measured[C] = int'(($time - t0) / 10);
        chk(measured[C] == EXPECT[C],
            $sformatf("config %0d: set-up plus operation took %0d clocks, expected %0d", C, measured[C], EXPECT[C]));
      end
      done[C] = 1;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    #20;
    $display("set-up time in clocks: (a) %0d (b) %0d (c) %0d (d) %0d (e) %0d",
             measured[0], measured[1], measured[2], measured[3], measured[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
