// tb_pdp1110_datapath: self-checking test of the PDP-11/10 one-bus data paths.
//
// A directed prologue fills the scratchpad from the UNIBUS through the DMUX,
// broadcasts one UNIBUS word to IR, B, BA and PS in one clock, and runs
// microsteps with known results: SPM[r] + B -> SPM[r], PS and A.AUX through
// the AMUX, B.AUX through the BMUX, and a bus word and the condition codes
// into PS in the same clock.  Then random control words (any AMUX input but
// the unused fourth, any set of sinks) are compared every clock with a
// reference model of the one-bus structure written here: the bus, the
// condition codes and every register.  The test counts broadcasts to several
// sinks, both DMUX inputs, each AMUX input, B.AUX use and the split PS load,
// fails if any never happened, and checks that each microstep takes one clock.
module tb_pdp1110_datapath;
  import bus_pkg::*;
  localparam int W = 16;

  logic clk = 0, rst_n;
  pdp1110_ctrl_t ctrl;
  logic [W-1:0] unibus_in, unibus_out, ir_out, bus;
  logic [17:0] bus_address;
  logic [7:0] ps_out;
  logic [3:0] cc;

  pdp1110_datapath dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_broadcast = 0, n_dmux_alu = 0, n_dmux_ub = 0, n_baux = 0, n_ps_split = 0;
  int n_amux [3] = '{0, 0, 0};

  logic [W-1:0] m_spm [16];
  logic [W-1:0] m_b, m_ir;
  logic [7:0]   m_ps;
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
  task automatic step(input pdp1110_ctrl_t c, input logic [W-1:0] ub);
    logic [W-1:0] e_a, e_bm, e_y, e_bus; logic [W+1:0] r; logic [3:0] e_cc;
    time t0;
    t0 = $time;
    ctrl = c; unibus_in = ub;
    #1;
    case (c.amux_sel)
      AMUX_SPM: e_a = m_spm[c.spm_addr];
      AMUX_PS:  e_a = {8'h00, m_ps};
      default:  e_a = {12'h000, c.aaux_const};
    endcase
    e_bm = c.bmux_sel ? ref_baux(c.baux_op, c.baux_const, m_b) : m_b;
    r = ref_alu(c.alu_op, e_a, e_bm);
    e_y = r[W-1:0];
    e_cc = {e_y[15], e_y == 0, r[W+1], r[W]};
    e_bus = c.dmux_sel ? ub : e_y;
    chk(bus == e_bus, $sformatf("bus %h exp %h", bus, e_bus));
    chk(unibus_out == e_bus, "bus to the UNIBUS");
    chk(cc == e_cc, $sformatf("cc %b exp %b", cc, e_cc));
    if (int'(c.spm_we) + int'(c.ld_ba) + int'(c.ld_ir) + int'(c.ld_b) + int'(c.ld_ps) > 1) n_broadcast++;
    if (c.dmux_sel) n_dmux_ub++; else n_dmux_alu++;
    n_amux[c.amux_sel]++;
    if (c.bmux_sel && !c.dmux_sel) n_baux++;
    if (c.ld_ps && c.ld_cc) n_ps_split++;
    @(posedge clk);
    if (c.spm_we) m_spm[c.spm_addr] = e_bus;
    if (c.ld_ba)  m_ba = {2'b00, e_bus};
    if (c.ld_ir)  m_ir = e_bus;
    if (c.ld_b)   m_b  = e_bus;
    if (c.ld_ps)  m_ps[7:4] = e_bus[7:4];
    if (c.ld_ps || c.ld_cc) m_ps[3:0] = c.ld_cc ? e_cc : e_bus[3:0];
    #1;
    chk(($time - t0) == 10, "one clock per microstep");
    chk(bus_address == m_ba, $sformatf("BA %h exp %h", bus_address, m_ba));
    chk(ir_out == m_ir, "IR");
    chk(ps_out == m_ps, $sformatf("PS %h exp %h", ps_out, m_ps));
    ctrl = '0;
  endtask

  function automatic pdp1110_ctrl_t idle();
    pdp1110_ctrl_t c; c = '0; c.alu_op = ALU_ADD; c.baux_op = BAUX_CONST; c.amux_sel = AMUX_AAUX; return c;
  endfunction

  function automatic pdp1110_ctrl_t rand_ctrl();
    pdp1110_ctrl_t c;
    c = pdp1110_ctrl_t'({$urandom, $urandom});
    c.amux_sel = amux_sel_e'($urandom % 3);
    return c;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pdp1110_ctrl_t c;
    ctrl = '0; unibus_in = '0; rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    m_ps = 0; m_b = 0; m_ir = 0; m_ba = 0;
    // UNIBUS -> DMUX -> SPM, one word per clock
    for (int i = 0; i < 16; i++) begin
      c = idle(); c.dmux_sel = 1; c.spm_we = 1; c.spm_addr = 4'(i);
      step(c, 16'h0100 * 16'(i) + 16'(i));
    end
    // one UNIBUS word broadcast to IR, B, BA and PS
    c = idle(); c.dmux_sel = 1; c.ld_ir = 1; c.ld_b = 1; c.ld_ba = 1; c.ld_ps = 1;
    step(c, 16'h80E5);
    chk(ir_out == 16'h80E5 && bus_address == 18'h080E5 && ps_out == 8'hE5, "broadcast from the UNIBUS");
    // SPM[5] + B -> SPM[5] in one clock
    c = idle(); c.amux_sel = AMUX_SPM; c.spm_addr = 5; c.spm_we = 1; c.alu_op = ALU_ADD;
    step(c, '0);
    c = idle(); c.amux_sel = AMUX_SPM; c.spm_addr = 5; c.alu_op = ALU_PASS_A; c.ld_ir = 1;
    step(c, '0);
    chk(ir_out == 16'h0505 + 16'h80E5, "SPM[5] + B -> SPM[5]");
    // PS through the AMUX; bus word into PS[7:4] and condition codes into PS[3:0]
    c = idle(); c.amux_sel = AMUX_PS; c.alu_op = ALU_SUB; c.ld_ps = 1; c.ld_cc = 1;
    step(c, '0);
    // 0x00E5 - 0x80E5 = 0x8000: N = 1, Z = 0, V = 1, C (borrow) = 1
    chk(ps_out == 8'h0B, $sformatf("PS = {bus[7:4], NZVC} %h", ps_out));
    // A.AUX constant op B.AUX byte swap
    c = idle(); c.amux_sel = AMUX_AAUX; c.aaux_const = 4'h3; c.bmux_sel = 1; c.baux_op = BAUX_SWAB;
    c.alu_op = ALU_OR; c.ld_b = 1;
    step(c, '0);
    c = idle(); c.amux_sel = AMUX_AAUX; c.aaux_const = 4'h0; c.alu_op = ALU_OR; c.ld_ir = 1;
    step(c, '0);
    chk(ir_out == 16'hE583, "B = A.AUX | swab(B)");
    for (int it = 0; it < 3000; it++) step(rand_ctrl(), W'($urandom));
    chk(n_broadcast > 0, "broadcast to several sinks");
    chk(n_dmux_alu > 0 && n_dmux_ub > 0, "both DMUX inputs");
    chk(n_amux[0] > 0 && n_amux[1] > 0 && n_amux[2] > 0, "every AMUX input");
    chk(n_baux > 0, "B.AUX through the BMUX");
    chk(n_ps_split > 0, "bus and condition codes into PS together");
    $display("mechanisms: broadcast=%0d dmux_alu=%0d dmux_unibus=%0d amux_spm=%0d amux_ps=%0d amux_aaux=%0d baux=%0d ps_split=%0d",
             n_broadcast, n_dmux_alu, n_dmux_ub, n_amux[0], n_amux[1], n_amux[2], n_baux, n_ps_split);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
