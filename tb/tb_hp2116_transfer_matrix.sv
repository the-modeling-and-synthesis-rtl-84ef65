// tb_hp2116_transfer_matrix: workload replaying the HP 2116 transfer matrix
// on the three-bus data paths.
//
// What it does: loads A, B, M, P and T with random words from memory, then
// runs every transfer of the matrix on its own (A->T, B->T, M->P, T->A/B/M/P,
// the ALU inputs and ALU->A/B/M/P/T) and every concurrency group as one
// control word: group 1 "A op T -> A, T", group 2 "P op ... -> M, P", group 3
// "P -> ALU -> T", group 4 "T -> ALU -> T" and group 5 "B op T -> B".  The
// transfers and groups follow the document's matrix; random data, the ALU
// function and the repetition count are this test's choice.
//
// How it checks: each group's control word must use at most one source per
// bus, no conflict may be flagged, every register, Bus 1 and the ALU output
// must match the reference model, and each group must finish in one clock.
// Prints TB_RESULT; a watchdog ends a hung run.
module tb_hp2116_transfer_matrix;
  import bus_pkg::*;
  localparam int W = 16;

  logic clk = 0, rst_n;
  hp_ctrl_t ctrl;
  logic [W-1:0] mem_rdata, a_out, b_out, m_out, p_out, t_out, bus1, alu_out;
  logic bus1_conflict, bus2_conflict;

  hp2116_datapath dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_three_bus = 0, n_broadcast = 0;
  logic [W-1:0] ma, mb, mm, mp, mt;

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

  task automatic step(input hp_ctrl_t c, input logic [W-1:0] mem);
    logic [W-1:0] x, z, y, b1;
    ctrl = c; mem_rdata = mem;
    #1;
    x = (c.g2_a ? ma : '0) | (c.g2_b ? mb : '0) | (c.g2_p ? mp : '0);
    z = c.g3_t ? mt : '0;
    y = ref_alu(c.alu_op, x, z);
    b1 = (c.g1_a ? ma : '0) | (c.g1_b ? mb : '0) | (c.g1_m ? mm : '0) | (c.g1_t ? mt : '0) | (c.g1_alu ? y : '0);
    chk(alu_out == y, $sformatf("alu %h exp %h", alu_out, y));
    chk(bus1 == b1, $sformatf("bus1 %h exp %h", bus1, b1));
    chk(!bus1_conflict && !bus2_conflict, "conflict");
    if ((c.g2_a | c.g2_b | c.g2_p) && c.g3_t && c.g1_alu) n_three_bus++;
    if (int'(c.ld_a) + int'(c.ld_b) + int'(c.ld_p) + int'(c.ld_t) + int'(c.ld_m && !c.m_from_mem) > 1) n_broadcast++;
    @(posedge clk);
    if (c.ld_a) ma = b1;
    if (c.ld_b) mb = b1;
    if (c.ld_m) mm = c.m_from_mem ? mem : b1;
    if (c.ld_p) mp = b1;
    if (c.ld_t) mt = b1;
    #1;
    chk(a_out == ma && b_out == mb && m_out == mm && p_out == mp && t_out == mt,
        $sformatf("regs A=%h/%h B=%h/%h M=%h/%h P=%h/%h T=%h/%h", a_out, ma, b_out, mb, m_out, mm, p_out, mp, t_out, mt));
    ctrl = '0;
  endtask

  function automatic hp_ctrl_t nop(); hp_ctrl_t c; c = '0; return c; endfunction

  localparam int T_A_ALU = 0, T_B_ALU = 1, T_P_ALU = 2, T_T_ALU = 3;
  localparam int T_ALU_A = 4, T_ALU_B = 5, T_ALU_M = 6, T_ALU_P = 7, T_ALU_T = 8;
  localparam int T_A_T = 9, T_B_T = 10, T_M_P = 11, T_T_A = 12, T_T_B = 13, T_T_M = 14, T_T_P = 15;
  localparam int NT = 16, NG = 5, REPS = 60;

  function automatic logic [NT-1:0] group(input int g);
    logic [NT-1:0] m; m = '0;
    case (g)
      1: begin m[T_A_ALU] = 1; m[T_T_ALU] = 1; m[T_ALU_A] = 1; m[T_ALU_T] = 1; end
      2: begin m[T_P_ALU] = 1; m[T_ALU_M] = 1; m[T_ALU_P] = 1; end
      3: begin m[T_P_ALU] = 1; m[T_ALU_T] = 1; end
      4: begin m[T_T_ALU] = 1; m[T_ALU_T] = 1; end
      default: begin m[T_B_ALU] = 1; m[T_T_ALU] = 1; m[T_ALU_B] = 1; end
    endcase
    return m;
  endfunction

  int n_b1_src, n_b2_src, n_single = 0, n_group = 0;

  function automatic hp_ctrl_t word(input logic [NT-1:0] m);
    hp_ctrl_t c;
    c = nop();
    c.alu_op = alu_op_e'($urandom);
    c.g2_a = m[T_A_ALU];
    c.g2_b = m[T_B_ALU];
    c.g2_p = m[T_P_ALU];
    c.g3_t = m[T_T_ALU];
    c.g1_alu = m[T_ALU_A] | m[T_ALU_B] | m[T_ALU_M] | m[T_ALU_P] | m[T_ALU_T];
    c.g1_a = m[T_A_T];
    c.g1_b = m[T_B_T];
    c.g1_m = m[T_M_P];
    c.g1_t = m[T_T_A] | m[T_T_B] | m[T_T_M] | m[T_T_P];
    c.ld_a = m[T_ALU_A] | m[T_T_A];
    c.ld_b = m[T_ALU_B] | m[T_T_B];
    c.ld_m = m[T_ALU_M] | m[T_T_M];
    c.ld_p = m[T_ALU_P] | m[T_M_P] | m[T_T_P];
    c.ld_t = m[T_ALU_T] | m[T_A_T] | m[T_B_T];
    n_b1_src = int'(c.g1_a) + int'(c.g1_b) + int'(c.g1_m) + int'(c.g1_t) + int'(c.g1_alu);
    n_b2_src = int'(c.g2_a) + int'(c.g2_b) + int'(c.g2_p);
    return c;
  endfunction

  task automatic load_all();
    hp_ctrl_t c;
    c = nop(); c.ld_m = 1; c.m_from_mem = 1; step(c, W'($urandom));
    c = nop(); c.g1_m = 1; c.ld_a = 1; step(c, '0);
    c = nop(); c.ld_m = 1; c.m_from_mem = 1; step(c, W'($urandom));
    c = nop(); c.g1_m = 1; c.ld_b = 1; step(c, '0);
    c = nop(); c.ld_m = 1; c.m_from_mem = 1; step(c, W'($urandom));
    c = nop(); c.g1_m = 1; c.ld_p = 1; step(c, '0);
    c = nop(); c.ld_m = 1; c.m_from_mem = 1; step(c, W'($urandom));
    c = nop(); c.g1_m = 1; c.ld_t = 1; step(c, '0);
    c = nop(); c.ld_m = 1; c.m_from_mem = 1; step(c, W'($urandom));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hp_ctrl_t c;
    time t0;
    ctrl = '0; mem_rdata = '0; rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    ma = 0; mb = 0; mm = 0; mp = 0; mt = 0;
    load_all();
    for (int t = 0; t < NT; t++)
      for (int r = 0; r < 4; r++) begin
        c = word(NT'(1) << t);
        t0 = $time;
        step(c, '0);
        chk(($time - t0) == 10, $sformatf("transfer %0d in one clock", t));
        n_single++;
      end
    for (int g = 1; g <= NG; g++)
      for (int r = 0; r < REPS; r++) begin
        if (r % 10 == 0) load_all();
        c = word(group(g));
        chk(n_b1_src <= 1 && n_b2_src <= 1, $sformatf("group %0d: one source per bus", g));
        t0 = $time;
        step(c, '0);
        chk(($time - t0) == 10, $sformatf("group %0d in one clock", g));
        n_group++;
      end
    chk(n_three_bus > 0 && n_broadcast > 0, "mechanisms exercised");
    $display("workload: single=%0d group_words=%0d groups=%0d three_bus=%0d broadcast=%0d",
             n_single, n_group, NG, n_three_bus, n_broadcast);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
