// tb_pdp1140_datapath: self-checking test of the PDP-11/40 data paths.
//
// A directed prologue fills the scratchpad and registers from the UNIBUS and
// runs a few microcycles with known results; then random legal control words
// (at most one source per bus, no sink reading an undriven bus) are applied
// and every register, bus, condition code and output is compared each cycle
// with a reference model of the two-bus structure written here.  The test
// also counts the mechanisms of the structure (both buses busy in one cycle,
// one source broadcast to several sinks, each join-node multiplexer input,
// B.AUX through the BMUX, BUS 1 and condition codes into PS together) and
// fails if any never happened.  Every transfer is checked to complete in
// exactly one clock.
module tb_pdp1140_datapath;
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

  function automatic pdp_ctrl_t rand_ctrl();
    pdp_ctrl_t c;
    int s1, s2;
    c = pdp_ctrl_t'({$urandom, $urandom});
    s1 = $urandom % 4; s2 = $urandom % 3;
    c.b1_unibus = (s1 == 1); c.b1_spm = (s1 == 2); c.b1_d = (s1 == 3);
    c.b2_spm = (s2 == 1); c.b2_ps = (s2 == 2);
    if (s1 == 0) begin  // no source on BUS 1: no BUS 1 sink
      c.ld_dpy = 0; c.ld_ir = 0; c.ld_b = 0; c.spm_we = 0;
      c.ld_ps = 0;
    end
    if (s2 == 0 && !c.ba_sel) c.ld_ba = 0;
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
    // UNIBUS -> BUS 1 -> SPM, one word per clock
    t0 = $time;
    for (int i = 0; i < 16; i++) begin
      c = idle(); c.b1_unibus = 1; c.spm_we = 1; c.spm_addr = 4'(i);
      step(c, 16'h1000 + 16'(i * 257));
    end
    chk(($time - t0) == 16 * 10, "one SPM load per clock");
    // UNIBUS word broadcast to IR, B, DPY and PS in one clock
    c = idle(); c.b1_unibus = 1; c.ld_ir = 1; c.ld_b = 1; c.ld_dpy = 1; c.ld_ps = 1;
    step(c, 16'h00F5);
    // SPM[3] -> BUS 2 -> ALU (+B) -> D, and SPM[3] -> BUS 1 -> B in the same clock
    c = idle(); c.spm_addr = 3; c.b2_spm = 1; c.b1_spm = 1; c.ld_b = 1; c.ld_d = 1; c.alu_op = ALU_ADD;
    step(c, '0);
    chk(unibus_d_out == 16'h1303 + 16'h00F5, "D = SPM[3] + B");
    // D -> BUS 1 -> SPM[7] while PS -> BUS 2 -> ALU -> D and ALU -> BA, CC -> PS
    c = idle(); c.spm_addr = 7; c.b1_d = 1; c.spm_we = 1; c.b2_ps = 1; c.ld_d = 1; c.alu_op = ALU_SUB;
    c.ld_ba = 1; c.ba_sel = 1; c.ld_cc = 1;
    step(c, '0);
    // SPM[7] -> BUS 2 -> BA MUX -> BA
    c = idle(); c.spm_addr = 7; c.b2_spm = 1; c.ld_ba = 1;
    step(c, '0);
    chk(bus_address == 18'(16'h13F8), "BA from BUS 2");
    // B.AUX byte swap of B through BMUX into D
    c = idle(); c.bmux_sel = 1; c.baux_op = BAUX_SWAB; c.alu_op = ALU_PASS_B; c.ld_d = 1;
    step(c, '0);
    chk(unibus_d_out == 16'h0313, "D = swab(B)");
    // random legal microcycles
    for (int it = 0; it < 3000; it++) step(rand_ctrl(), W'($urandom));
    chk(n_parallel > 0,  "both buses used in one clock");
    chk(n_broadcast > 0, "broadcast to several sinks");
    chk(n_ba_bus2 > 0 && n_ba_alu > 0, "both BA MUX inputs");
    chk(n_ps_bus1 > 0 && n_ps_cc > 0,  "both PS MUX inputs");
    chk(n_ps_split > 0, "BUS 1 and condition codes into PS together");
    chk(n_baux > 0, "B.AUX through BMUX");
    $display("mechanisms: parallel=%0d broadcast=%0d ba_bus2=%0d ba_alu=%0d ps_bus1=%0d ps_cc=%0d ps_split=%0d baux=%0d",
             n_parallel, n_broadcast, n_ba_bus2, n_ba_alu, n_ps_bus1, n_ps_cc, n_ps_split, n_baux);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
