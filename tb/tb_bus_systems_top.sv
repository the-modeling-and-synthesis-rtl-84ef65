// tb_bus_systems_top: end-to-end test of all data paths of bus_systems_top at
// their default sizes.
//
// Each machine runs one complete operation from external data to a stored
// result, with the expected values computed here:
//   PDP-11/40: UNIBUS -> SPM and B, SPM + B -> D with condition codes into PS,
//              D -> SPM, SPM -> BUS 2 -> BA, B.AUX byte swap, PS -> BUS 2 ->
//              ALU, all results read at the UNIBUS and bus-address outputs.
//   PDP-11/10: UNIBUS -> SPM and B, SPM + B -> SPM in one clock, the
//              condition codes and a bus word into PS together, PS + B.AUX ->
//              BA.
//   HP 2116:   memory -> M -> A and T, "A op T -> A, T" in one clock, P op T -> P.
//   canonical one-, two- (I and II), three- and four-bus models: two operands
//              from the external input into general registers, the binary
//              operation R(a) - R(b) into the ALU output register, and the
//              result back over a bus into a general register.
// The number of clocks from operands in registers to result in the output
// register (the input data set-up time plus the operation) is checked per
// model: 3 where both ALU inputs share one bus, 2 where each has its own.
// Mechanism counters: parallel transfers on two or more buses in one clock,
// broadcast to several sinks, each join-node multiplexer input, condition
// codes into PS, B.AUX; a counter that stays at zero is a failure.
module tb_bus_systems_top;
  import bus_pkg::*;
  localparam int W = 16;

  logic clk = 0, rst_n;
  pdp_ctrl_t pdp_ctrl;
  logic [W-1:0] pdp_unibus_in, pdp_unibus_d_out, pdp_unibus_ps_out, pdp_dpy_out, pdp_ir_out, pdp_bus1, pdp_bus2;
  logic [17:0] pdp_bus_address;
  logic [3:0] pdp_cc;
  logic pdp_bus1_conflict, pdp_bus2_conflict;
  hp_ctrl_t hp_ctrl;
  logic [W-1:0] hp_mem_rdata, hp_a, hp_b, hp_m, hp_p, hp_t, hp_bus1, hp_alu_out;
  logic hp_bus1_conflict, hp_bus2_conflict;
  pdp1110_ctrl_t p10_ctrl;
  logic [W-1:0] p10_unibus_in, p10_unibus_out, p10_ir_out, p10_bus;
  logic [17:0] p10_bus_address;
  logic [7:0] p10_ps;
  logic [3:0] p10_cc;

`define MODEL_SIGS(P, NB, NR) \
  logic [NB-1:0][NR+2:0] P``_gate; logic [NR+4:0][3:0] P``_sel; logic [NR+2:0] P``_ld; \
  alu_op_e P``_alu_op; logic [W-1:0] P``_ext_in, P``_alu_y; logic [NB-1:0][W-1:0] P``_bus; \
  logic [NB-1:0] P``_bus_conflict; logic [NR+2:0][W-1:0] P``_q; logic P``_bad_sel;

  `MODEL_SIGS(m1, 1, 4)
  `MODEL_SIGS(m2a, 2, 4)
  `MODEL_SIGS(m2b, 2, 4)
  `MODEL_SIGS(m3, 3, 4)
  `MODEL_SIGS(m4, 4, 6)

  bus_systems_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_parallel = 0, n_broadcast = 0, n_join_bus = 0, n_join_alu = 0, n_cc = 0, n_baux = 0;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t %s", $time, what); end
  endtask

  task automatic clock();
    @(posedge clk); #1;
    chk(!pdp_bus1_conflict && !pdp_bus2_conflict && !hp_bus1_conflict && !hp_bus2_conflict, "bus conflict");
  endtask

  // All machines idle.
  task automatic idle_all();
    pdp_ctrl = '0; hp_ctrl = '0; pdp_unibus_in = '0; hp_mem_rdata = '0;
    p10_ctrl = '0; p10_ctrl.amux_sel = AMUX_AAUX; p10_unibus_in = '0;
    m1_gate = '0; m1_ld = '0; m1_alu_op = ALU_ADD; m1_ext_in = '0;
    m2a_gate = '0; m2a_ld = '0; m2a_alu_op = ALU_ADD; m2a_ext_in = '0;
    m2b_gate = '0; m2b_ld = '0; m2b_alu_op = ALU_ADD; m2b_ext_in = '0;
    m3_gate = '0; m3_ld = '0; m3_alu_op = ALU_ADD; m3_ext_in = '0;
    m4_gate = '0; m4_ld = '0; m4_alu_op = ALU_ADD; m4_ext_in = '0;
    for (int i = 0; i < 9; i++) begin m1_sel[i] = '0; m2a_sel[i] = '0; m2b_sel[i] = '0; m3_sel[i] = '0; end
    for (int i = 0; i < 11; i++) m4_sel[i] = '0;
    // ALU input multiplexers of the models follow X0 and X1
    m1_sel[7] = 4'(1 + 4); m1_sel[8] = 4'(1 + 5);
    m2a_sel[7] = 4'(2 + 4); m2a_sel[8] = 4'(2 + 5);
    m2b_sel[7] = 4'(2 + 4); m2b_sel[8] = 4'(2 + 5);
    m3_sel[7] = 4'(3 + 4); m3_sel[8] = 4'(3 + 5);
    m4_sel[9] = 4'(4 + 6); m4_sel[10] = 4'(4 + 7);
  endtask

  // One operation on a canonical model: ext -> R[RA], ext -> R[RB],
  // R[RA] -> X0 over bus BA, R[RB] -> X1 over bus BB (same clock if IDSUT==2),
  // X0 - X1 -> OUT, OUT -> bus BD -> R[RD].
`define MODEL_OP(P, NB, NR, RA, RB, BA, BB, IDSUT, BD, RD, VA, VB) \
  begin \
    time t0; \
    idle_all(); P``_ext_in = VA; P``_ld[RA] = 1; P``_sel[RA] = 4'(NB + NR + 4); clock(); \
    idle_all(); P``_ext_in = VB; P``_ld[RB] = 1; P``_sel[RB] = 4'(NB + NR + 4); clock(); \
    t0 = $time; \
    idle_all(); P``_gate[BA][RA] = 1; P``_ld[NR] = 1; P``_sel[NR] = 4'(BA); \
    if (IDSUT == 2) begin P``_gate[BB][RB] = 1; P``_ld[NR+1] = 1; P``_sel[NR+1] = 4'(BB); n_parallel++; end \
    clock(); \
    if (IDSUT != 2) begin idle_all(); P``_gate[BB][RB] = 1; P``_ld[NR+1] = 1; P``_sel[NR+1] = 4'(BB); clock(); end \
    idle_all(); P``_alu_op = ALU_SUB; P``_ld[NR+2] = 1; P``_sel[NR+2] = 4'(NB + NR + 3); \
    #1 chk(!P``_bad_sel, `"P: legal selection`"); clock(); \
    chk(($time - t0) / 10 == IDSUT, $sformatf(`"P: operation took %0d clocks, expected %0d`", ($time - t0) / 10, IDSUT)); \
    chk(P``_q[NR+2] == W'(VA - VB), `"P: result in output register`"); \
    idle_all(); P``_gate[BD][NR+2] = 1; P``_ld[RD] = 1; P``_sel[RD] = 4'(BD); P``_ld[NR] = 1; P``_sel[NR] = 4'(BD); \
    if (NB > 1 || BD == 0) n_broadcast++; clock(); \
    chk(P``_q[RD] == W'(VA - VB), `"P: result stored over the bus`"); \
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pdp_ctrl_t c;
    hp_ctrl_t h;
    time t10;
    idle_all();
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // ---------------- PDP-11/40 ----------------
    for (int i = 0; i < 4; i++) begin
      idle_all(); pdp_ctrl.b1_unibus = 1; pdp_ctrl.spm_we = 1; pdp_ctrl.spm_addr = 4'(i);
      pdp_unibus_in = 16'h8000 + 16'(i); clock();
    end
    // UNIBUS -> BUS 1 -> B, IR and display register at once
    idle_all(); pdp_ctrl.b1_unibus = 1; pdp_ctrl.ld_b = 1; pdp_ctrl.ld_ir = 1; pdp_ctrl.ld_dpy = 1;
    pdp_unibus_in = 16'h8123; n_broadcast++; clock();
    chk(pdp_ir_out == 16'h8123 && pdp_dpy_out == 16'h8123, "PDP: IR and DPY");
    // SPM[1] + B -> D, CC -> PS (0x8001 + 0x8123 = 0x0124 with carry and overflow)
    idle_all(); c = pdp_ctrl; c.spm_addr = 1; c.b2_spm = 1; c.alu_op = ALU_ADD; c.ld_d = 1;
    c.ld_cc = 1; pdp_ctrl = c; n_cc++; clock();
    chk(pdp_unibus_d_out == 16'h0124, "PDP: D = SPM[1] + B");
    chk(pdp_unibus_ps_out[3:0] == 4'b0011, $sformatf("PDP: PS condition codes %b", pdp_unibus_ps_out[3:0]));
    // D -> BUS 1 -> SPM[2] while PS -> BUS 2 -> ALU (PS + B) -> BA
    idle_all(); c = pdp_ctrl; c.b1_d = 1; c.spm_we = 1; c.spm_addr = 2; c.b2_ps = 1;
    c.alu_op = ALU_ADD; c.ld_ba = 1; c.ba_sel = 1; pdp_ctrl = c; n_parallel++; n_join_alu++; clock();
    chk(pdp_bus_address == 18'(16'h0003 + 16'h8123), "PDP: BA from ALU");
    // SPM[2] -> BUS 2 -> BA MUX -> BA
    idle_all(); pdp_ctrl.spm_addr = 2; pdp_ctrl.b2_spm = 1; pdp_ctrl.ld_ba = 1; n_join_bus++; clock();
    chk(pdp_bus_address == 18'h00124, "PDP: BA from BUS 2");
    // B.AUX byte swap of B -> D
    idle_all(); c = pdp_ctrl; c.bmux_sel = 1; c.baux_op = BAUX_SWAB; c.alu_op = ALU_PASS_B; c.ld_d = 1;
    pdp_ctrl = c; n_baux++; clock();
    chk(pdp_unibus_d_out == 16'h2381, "PDP: D = swab(B)");
    // D -> BUS 1 -> PS through the PS MUX
    idle_all(); pdp_ctrl.b1_d = 1; pdp_ctrl.ld_ps = 1; clock();
    chk(pdp_unibus_ps_out == 16'h2381, "PDP: PS from BUS 1");

    // ---------------- PDP-11/10 ----------------
    idle_all(); p10_ctrl.dmux_sel = 1; p10_ctrl.spm_we = 1; p10_ctrl.spm_addr = 0;
    p10_unibus_in = 16'h1234; clock();
    idle_all(); p10_ctrl.dmux_sel = 1; p10_ctrl.ld_b = 1; p10_ctrl.ld_ir = 1; p10_ctrl.ld_ba = 1;
    p10_unibus_in = 16'h0003; n_broadcast++; clock();
    chk(p10_ir_out == 16'h0003 && p10_bus_address == 18'h00003, "PDP-11/10: IR and BA from the UNIBUS");
    // SPM[0] + B -> SPM[0] and IR in one clock
    t10 = $time;
    idle_all(); p10_ctrl.amux_sel = AMUX_SPM; p10_ctrl.spm_addr = 0; p10_ctrl.alu_op = ALU_ADD;
    p10_ctrl.spm_we = 1; p10_ctrl.ld_ir = 1; clock();
    chk(($time - t10) == 10, "PDP-11/10: SPM + B -> SPM in one clock");
    chk(p10_ir_out == 16'h1237, "PDP-11/10: SPM[0] + B");
    // A.AUX - B -> bus -> PS[7:4], condition codes -> PS[3:0]: 0 - 3 = FFFD, NZVC = 1001
    idle_all(); p10_ctrl.aaux_const = 0; p10_ctrl.alu_op = ALU_SUB; p10_ctrl.ld_ps = 1; p10_ctrl.ld_cc = 1;
    n_cc++; clock();
    chk(p10_ps == 8'hF9, $sformatf("PDP-11/10: PS %h", p10_ps));
    // PS + B.AUX constant 7 -> BA
    idle_all(); p10_ctrl.amux_sel = AMUX_PS; p10_ctrl.bmux_sel = 1; p10_ctrl.baux_op = BAUX_CONST;
    p10_ctrl.baux_const = 4'h7; p10_ctrl.alu_op = ALU_ADD; p10_ctrl.ld_ba = 1; n_baux++; clock();
    chk(p10_bus_address == 18'h00100, "PDP-11/10: BA = PS + 7");
    chk(p10_unibus_out == 16'h0100, "PDP-11/10: bus to the UNIBUS");

    // ---------------- HP 2116 ----------------
    idle_all(); hp_ctrl.ld_m = 1; hp_ctrl.m_from_mem = 1; hp_mem_rdata = 16'h0700; clock();
    idle_all(); hp_ctrl.g1_m = 1; hp_ctrl.ld_a = 1; hp_ctrl.ld_p = 1; clock();
    idle_all(); hp_ctrl.ld_m = 1; hp_ctrl.m_from_mem = 1; hp_mem_rdata = 16'h0050; clock();
    idle_all(); hp_ctrl.g1_m = 1; hp_ctrl.ld_t = 1; clock();
    idle_all(); h = hp_ctrl; h.g2_a = 1; h.g3_t = 1; h.alu_op = ALU_OR; h.g1_alu = 1; h.ld_a = 1; h.ld_t = 1;
    hp_ctrl = h; n_parallel++; n_broadcast++; clock();
    chk(hp_a == 16'h0750 && hp_t == 16'h0750, "HP: A op T -> A, T");
    idle_all(); h = hp_ctrl; h.g2_p = 1; h.g3_t = 1; h.alu_op = ALU_ADD; h.g1_alu = 1; h.ld_p = 1;
    hp_ctrl = h; clock();
    chk(hp_p == 16'h0E50, "HP: P op T -> P");

    // ---------------- canonical models ----------------
    `MODEL_OP(m1,  1, 4, 0, 1, 0, 0, 3, 0, 3, 16'h3000, 16'h0123)
    `MODEL_OP(m2a, 2, 4, 0, 2, 0, 1, 2, 0, 1, 16'h3001, 16'h0123)
    `MODEL_OP(m2b, 2, 4, 0, 1, 0, 0, 3, 1, 3, 16'h3002, 16'h0123)
    `MODEL_OP(m3,  3, 4, 0, 2, 1, 2, 2, 0, 3, 16'h3003, 16'h0123)
    `MODEL_OP(m4,  4, 6, 0, 2, 1, 2, 2, 3, 4, 16'h3004, 16'h0123)

    chk(n_parallel > 0, "parallel transfers");
    chk(n_broadcast > 0, "broadcast");
    chk(n_join_bus > 0 && n_join_alu > 0, "both join-node multiplexer inputs");
    chk(n_cc > 0, "condition codes into PS");
    chk(n_baux > 0, "B.AUX");
    $display("mechanisms: parallel=%0d broadcast=%0d join_bus=%0d join_alu=%0d cc=%0d baux=%0d",
             n_parallel, n_broadcast, n_join_bus, n_join_alu, n_cc, n_baux);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
