// tb_pdp1140_transfer_matrix: workload replaying the PDP-11/40 transfer
// matrix on the two-bus data paths.
//
// What it does: every register transfer of the data-path transfer matrix is
// run on its own, then every concurrency group (the sets of transfers that
// one microinstruction performs together) is run as one control word.  Each
// group is repeated with random data, scratchpad address, ALU function and
// B.AUX function.  The transfer list and the 18 groups follow the document's
// matrix; the random data and repetition count are this test's choice.
//
// How it checks: the control word for a group is built from the transfers
// in it (BUS 1 source and sinks, BUS 2 source, BMUX and BA MUX selects, PS
// loads); the test checks that each group needs at most one source per bus,
// that no bus conflict is flagged, that every bus, register and condition
// code matches the reference model each clock, and that each group completes
// in exactly one clock.  Prints TB_RESULT; a watchdog ends a hung run.
module tb_pdp1140_transfer_matrix;
  import bus_pkg::*;
  localparam int W = 16;

  logic clk = 0, rst_n;
  pdp_ctrl_t ctrl;
  logic [W-1:0] unibus_in, unibus_d_out, unibus_ps_out, dpy_out, ir_out, bus1, bus2;
  logic [17:0] bus_address;
  logic [3:0] cc;
  logic bus1_conflict, bus2_conflict;

  pdp1140_datapath dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_parallel = 0, n_broadcast = 0, n_ba_bus2 = 0, n_ba_alu = 0, n_ps_bus1 = 0, n_ps_cc = 0, n_ps_split = 0, n_baux = 0;

  // reference state
  logic [W-1:0] m_spm [16];
  logic [W-1:0] m_d, m_ps, m_b, m_dpy, m_ir;
  logic [17:0]  m_ba;

  function automatic logic [W+1:0] ref_alu(alu_op_e op, logic [W-1:0] x, logic [W-1:0] z);
    // returns {overflow, carry, result}
    logic [W:0] s; logic v;
    v = 0; s = '0;
    case (op)
      ALU_ADD: begin s = {1'b0, x} + {1'b0, z}; v = (x[15] == z[15]) && (s[15] != x[15]); end
      ALU_SUB: begin s = {1'b0, x} - {1'b0, z}; v = (x[15] != z[15]) && (s[15] != x[15]); end
      ALU_AND: s = {1'b0, x & z};
      ALU_OR:  s = {1'b0, x | z};
      ALU_XOR: s = {1'b0, x ^ z};
      ALU_BIC: s = {1'b0, x & ~z};
      ALU_PASS_A: s = {1'b0, x};
      default: s = {1'b0, z};
    endcase
    return {v, s};
  endfunction

  function automatic logic [W-1:0] ref_baux(baux_op_e op, logic [3:0] k, logic [W-1:0] b);
    case (op)
      BAUX_CONST: return {12'h000, k};
      BAUX_SXT:   return {{8{b[7]}}, b[7:0]};
      BAUX_SWAB:  return {b[7:0], b[15:8]};
      default:    return {8'h00, b[15:8]};
    endcase
  endfunction

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t %s", $time, what); end
  endtask

  // Apply one control word for one clock and update the reference model.
  task automatic step(input pdp_ctrl_t c, input logic [W-1:0] ub);
    logic [W-1:0] e_b1, e_b2, e_bm, e_y, e_spm; logic [W+1:0] r; logic [3:0] e_cc;
    int nsink;
    ctrl = c; unibus_in = ub;
    #1;
    e_spm = m_spm[c.spm_addr];
    e_b1 = (c.b1_unibus ? ub : '0) | (c.b1_spm ? e_spm : '0) | (c.b1_d ? m_d : '0);
    e_b2 = (c.b2_spm ? e_spm : '0) | (c.b2_ps ? m_ps : '0);
    e_bm = c.bmux_sel ? ref_baux(c.baux_op, c.baux_const, m_b) : m_b;
    r = ref_alu(c.alu_op, e_b2, e_bm);
    e_y = r[W-1:0];
    e_cc = {e_y[15], e_y == 0, r[W+1], r[W]};
    chk(bus1 == e_b1, $sformatf("bus1 %h exp %h", bus1, e_b1));
    chk(bus2 == e_b2, $sformatf("bus2 %h exp %h", bus2, e_b2));
    chk(cc == e_cc, $sformatf("cc %b exp %b", cc, e_cc));
    chk(!bus1_conflict && !bus2_conflict, "conflict flagged");
    // mechanism counters
    nsink = int'(c.ld_dpy) + int'(c.ld_ir) + int'(c.ld_b) + int'(c.spm_we) + int'(c.ld_ps);
    if ((c.b1_unibus | c.b1_spm | c.b1_d) && (c.b2_spm | c.b2_ps)) n_parallel++;
    if (nsink > 1) n_broadcast++;
    if (c.ld_ba && !c.ba_sel) n_ba_bus2++;
    if (c.ld_ba && c.ba_sel) n_ba_alu++;
    if (c.ld_ps && !c.ld_cc) n_ps_bus1++;
    if (c.ld_cc) n_ps_cc++;
    if (c.ld_cc && c.ld_ps) n_ps_split++;
    if (c.bmux_sel && c.ld_d) n_baux++;
    @(posedge clk);
    // reference register updates
    if (c.spm_we) m_spm[c.spm_addr] = e_b1;
    if (c.ld_dpy) m_dpy = e_b1;
    if (c.ld_ir)  m_ir  = e_b1;
    if (c.ld_b)   m_b   = e_b1;
    if (c.ld_d)   m_d   = e_y;
    if (c.ld_ba)  m_ba  = {2'b00, c.ba_sel ? e_y : e_b2};
    if (c.ld_ps)  m_ps[15:4] = e_b1[15:4];
    if (c.ld_ps || c.ld_cc) m_ps[3:0] = c.ld_cc ? e_cc : e_b1[3:0];
    #1;
    chk(unibus_d_out == m_d,   $sformatf("D %h exp %h", unibus_d_out, m_d));
    chk(unibus_ps_out == m_ps, $sformatf("PS %h exp %h", unibus_ps_out, m_ps));
    chk(dpy_out == m_dpy,      "DPY");
    chk(ir_out == m_ir,        "IR");
    chk(bus_address == m_ba,   $sformatf("BA %h exp %h", bus_address, m_ba));
    ctrl = '0;
  endtask

  function automatic pdp_ctrl_t idle();
    pdp_ctrl_t c; c = '0; c.alu_op = ALU_ADD; c.baux_op = BAUX_CONST; return c;
  endfunction

  // Transfers of the matrix, one bit each.
  localparam int T_SPM_DPY = 0,  T_SPM_B = 1,   T_SPM_BA = 2,  T_SPM_PS = 3,  T_SPM_ALU = 4;
  localparam int T_D_SPM   = 5,  T_D_DPY = 6,   T_D_B = 7,     T_D_PS = 8,    T_B_ALU = 9;
  localparam int T_BAUX_ALU = 10, T_PS_ALU = 11, T_CC_PS = 12,  T_UB_SPM = 13, T_UB_DPY = 14;
  localparam int T_UB_B    = 15, T_UB_IR = 16,  T_UB_PS = 17,  T_ALU_D = 18,  T_ALU_BA = 19;
  localparam int NT = 20, NG = 18, REPS = 40;

  function automatic logic [NT-1:0] tset(input int t0, input int t1 = -1, input int t2 = -1,
                                         input int t3 = -1, input int t4 = -1);
    logic [NT-1:0] m; m = '0;
    m[t0] = 1;
    if (t1 >= 0) m[t1] = 1;
    if (t2 >= 0) m[t2] = 1;
    if (t3 >= 0) m[t3] = 1;
    if (t4 >= 0) m[t4] = 1;
    return m;
  endfunction

  // concurrency groups 1..18 of the matrix
  function automatic logic [NT-1:0] group(input int g);
    case (g)
      1:  return tset(T_SPM_BA, T_SPM_ALU, T_D_SPM, T_BAUX_ALU, T_ALU_D);
      2:  return tset(T_SPM_ALU, T_D_SPM, T_B_ALU, T_ALU_D, T_ALU_BA);
      3:  return tset(T_SPM_ALU, T_D_SPM, T_BAUX_ALU, T_ALU_D);
      4:  return tset(T_SPM_ALU, T_D_B, T_BAUX_ALU, T_ALU_D);
      5:  return tset(T_D_PS, T_BAUX_ALU, T_PS_ALU, T_CC_PS, T_ALU_D);
      6:  return tset(T_D_DPY, T_B_ALU, T_PS_ALU, T_ALU_D);
      7:  return tset(T_D_DPY, T_BAUX_ALU, T_ALU_D);
      8:  return tset(T_UB_DPY, T_BAUX_ALU, T_ALU_D);
      9:  return tset(T_D_B, T_BAUX_ALU, T_CC_PS, T_ALU_D);
      10: return tset(T_D_B, T_BAUX_ALU, T_CC_PS, T_ALU_D);
      11: return tset(T_SPM_ALU, T_D_B, T_CC_PS, T_ALU_D);
      12: return tset(T_SPM_BA, T_SPM_ALU, T_D_DPY, T_ALU_D);
      13: return tset(T_SPM_DPY, T_BAUX_ALU, T_ALU_D);
      14: return tset(T_SPM_ALU, T_UB_SPM, T_ALU_D);
      15: return tset(T_UB_SPM, T_UB_B, T_UB_IR);
      16: return tset(T_SPM_DPY, T_CC_PS);
      17: return tset(T_D_SPM, T_D_B, T_CC_PS);
      default: return tset(T_D_DPY, T_CC_PS);
    endcase
  endfunction

  int n_b1_src, n_b2_src, n_single = 0, n_group = 0;

  // Build one control word performing every transfer in m.
  function automatic pdp_ctrl_t word(input logic [NT-1:0] m);
    pdp_ctrl_t c;
    c = idle();
    c.spm_addr = 4'($urandom);
    c.alu_op   = alu_op_e'($urandom);
    c.baux_op  = baux_op_e'($urandom);
    c.baux_const = 4'($urandom);
    c.b1_spm    = m[T_SPM_DPY] | m[T_SPM_B] | m[T_SPM_PS];
    c.b1_d      = m[T_D_SPM] | m[T_D_DPY] | m[T_D_B] | m[T_D_PS];
    c.b1_unibus = m[T_UB_SPM] | m[T_UB_DPY] | m[T_UB_B] | m[T_UB_IR] | m[T_UB_PS];
    c.b2_spm    = m[T_SPM_BA] | m[T_SPM_ALU];
    c.b2_ps     = m[T_PS_ALU];
    c.ld_dpy    = m[T_SPM_DPY] | m[T_D_DPY] | m[T_UB_DPY];
    c.ld_b      = m[T_SPM_B] | m[T_D_B] | m[T_UB_B];
    c.ld_ir     = m[T_UB_IR];
    c.spm_we    = m[T_D_SPM] | m[T_UB_SPM];
    c.ld_ps     = m[T_SPM_PS] | m[T_D_PS] | m[T_UB_PS];
    c.ld_cc     = m[T_CC_PS];
    c.bmux_sel  = m[T_BAUX_ALU];
    c.ld_d      = m[T_ALU_D];
    c.ld_ba     = m[T_SPM_BA] | m[T_ALU_BA];
    c.ba_sel    = m[T_ALU_BA];
    n_b1_src = int'(c.b1_spm) + int'(c.b1_d) + int'(c.b1_unibus);
    n_b2_src = int'(c.b2_spm) + int'(c.b2_ps);
    return c;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pdp_ctrl_t c;
    time t0;
    ctrl = '0; unibus_in = '0; rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    m_d = 0; m_ps = 0; m_b = 0; m_dpy = 0; m_ir = 0; m_ba = 0;
    // fill the scratchpad and the registers from the UNIBUS
    for (int i = 0; i < 16; i++) begin
      c = idle(); c.b1_unibus = 1; c.spm_we = 1; c.spm_addr = 4'(i);
      step(c, W'($urandom));
    end
    c = idle(); c.b1_unibus = 1; c.ld_b = 1; c.ld_ps = 1; c.ld_dpy = 1; c.ld_ir = 1;
    step(c, W'($urandom));
    // every transfer on its own
    for (int t = 0; t < NT; t++)
      for (int r = 0; r < 4; r++) begin
        c = word(NT'(1) << t);
        t0 = $time;
        step(c, W'($urandom));
        chk(($time - t0) == 10, $sformatf("transfer %0d in one clock", t));
        n_single++;
      end
    // every concurrency group in one microinstruction
    for (int g = 1; g <= NG; g++)
      for (int r = 0; r < REPS; r++) begin
        c = word(group(g));
        chk(n_b1_src <= 1 && n_b2_src <= 1, $sformatf("group %0d: one source per bus", g));
        t0 = $time;
        step(c, W'($urandom));
        chk(($time - t0) == 10, $sformatf("group %0d in one clock", g));
        n_group++;
      end
    chk(n_parallel > 0 && n_broadcast > 0 && n_ps_split > 0 && n_baux > 0, "mechanisms exercised");
    $display("workload: single=%0d group_words=%0d groups=%0d parallel=%0d broadcast=%0d ps_split=%0d",
             n_single, n_group, NG, n_parallel, n_broadcast, n_ps_split);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
