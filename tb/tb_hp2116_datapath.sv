// tb_hp2116_datapath: self-checking test of the HP 2116 data paths.
//
// Loads A, B, M, P and T from memory through M, then replays the kinds of
// microinstruction the allocation was derived from: the concurrent group
// "A op T -> A, T" (A on Bus 2, T on Bus 3, the ALU result broadcast on Bus 1
// to A and T in one clock), the single transfers A->T, B->T, M->P,
// T->A/B/M/P, ALU->M/P, and P op T -> P.  After the directed part, random
// legal control words are checked cycle by cycle against a reference model.
// Counts concurrent cycles (all three buses busy) and broadcasts and fails if
// none happened; checks that each microinstruction takes one clock.
module tb_hp2116_datapath;
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

  function automatic hp_ctrl_t rand_ctrl();
    hp_ctrl_t c; int s1, s2;
    c = hp_ctrl_t'($urandom);
    s1 = $urandom % 6; s2 = $urandom % 4;
    {c.g1_alu, c.g1_t, c.g1_m, c.g1_b, c.g1_a} = (s1 == 0) ? 5'b0 : 5'(1 << (s1 - 1));
    {c.g2_p, c.g2_b, c.g2_a} = (s2 == 0) ? 3'b0 : 3'(1 << (s2 - 1));
    if (s1 == 0) begin
      c.ld_a = 0; c.ld_b = 0; c.ld_p = 0; c.ld_t = 0;
      if (!c.m_from_mem) c.ld_m = 0;
    end
    return c;
  endfunction

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
    // memory -> M -> {A, B, P, T}
    c = nop(); c.ld_m = 1; c.m_from_mem = 1; step(c, 16'h0123);
    c = nop(); c.g1_m = 1; c.ld_a = 1; step(c, '0);
    c = nop(); c.ld_m = 1; c.m_from_mem = 1; step(c, 16'h0456);
    c = nop(); c.g1_m = 1; c.ld_b = 1; step(c, '0);
    c = nop(); c.ld_m = 1; c.m_from_mem = 1; step(c, 16'h2000);
    c = nop(); c.g1_m = 1; c.ld_p = 1; step(c, '0);                  // M -> P
    c = nop(); c.g1_b = 1; c.ld_t = 1; step(c, '0);                  // B -> T
    chk(t_out == 16'h0456, "B -> T");
    // A op T -> A, T in one clock
    t0 = $time;
    c = nop(); c.g2_a = 1; c.g3_t = 1; c.alu_op = ALU_ADD; c.g1_alu = 1; c.ld_a = 1; c.ld_t = 1;
    step(c, '0);
    chk(($time - t0) == 10, "A op T -> A, T in one clock");
    chk(a_out == 16'h0579 && t_out == 16'h0579, "A op T -> A, T result");
    // A -> T, T -> B, T -> M, T -> P (reading back), P op T -> P
    c = nop(); c.g1_a = 1; c.ld_t = 1; step(c, '0);
    c = nop(); c.g1_t = 1; c.ld_b = 1; c.ld_m = 1; step(c, '0);
    c = nop(); c.g2_p = 1; c.g3_t = 1; c.alu_op = ALU_ADD; c.g1_alu = 1; c.ld_p = 1; step(c, '0);
    chk(p_out == 16'h2579, "P op T -> P");
    c = nop(); c.g2_b = 1; c.g3_t = 1; c.alu_op = ALU_XOR; c.g1_alu = 1; c.ld_m = 1; step(c, '0);
    chk(m_out == 16'h0000, "B xor T -> M");
    for (int it = 0; it < 3000; it++) step(rand_ctrl(), W'($urandom));
    chk(n_three_bus > 0, "three buses busy in one clock");
    chk(n_broadcast > 0, "broadcast on bus 1");
    $display("mechanisms: three_bus=%0d broadcast=%0d", n_three_bus, n_broadcast);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
