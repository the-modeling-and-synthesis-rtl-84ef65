// pdp1140_datapath: the PDP-11/40 data paths as allocated by the bus
// synthesis algorithm (two general buses and two join-node multiplexers).
//
// Structure (all data paths 16 bits unless noted):
//   BUS 1  sources: UNIBUS receivers, SPM, D register.
//          sinks:   display register, IR, PS (PS[3:0] through the PS MUX),
//                   SPM, B.
//   BUS 2  sources: SPM, PS.
//          sinks:   ALU left input, BA MUX.
//   BMUX   chooses the ALU right input: B register or B.AUX.
//   ALU    result goes to D, to the BA MUX and, as condition codes, to the
//          PS MUX.
//   BA MUX chooses BUS 2 or the ALU result for the 18-bit bus address BA.
//   PS MUX 4-bit multiplexer choosing BUS 1 or the condition codes for
//          PS[3:0]; PS[15:4] load from BUS 1.  With both ld_ps and ld_cc
//          one clock stores D (say) and the new condition codes into PS.
//   D and PS are also driven to the UNIBUS.
// BA MUX and PS MUX are the refinement of the two join nodes: BA is fed by two
// buses and PS by BUS 1 and the condition codes.  The PS MUX is 4 bits wide,
// as drawn; the source's transfer matrix has D -> PS and CC -> PS in the same
// microinstruction, which this split load supports.
//
// One control word (bus_pkg::pdp_ctrl_t) per clock: it opens at most one
// source gate per bus, any number of sink gates, and selects the multiplexers.
// A transfer source -> bus -> sink completes at the next rising edge, so
// SPM -> BUS 2 -> ALU -> D and UNIBUS -> BUS 1 -> SPM can happen in the same
// cycle.  The SPM is addressed by one field for both reading and writing.
//
// From the source design: the bus structure, the sources and sinks of each bus,
// the multiplexers, the 18-bit bus address and the 4-bit condition-code path.
// This library's choices: the control-word layout, zero extension of the
// 16-bit BA MUX output to 18 bits, the ALU and B.AUX operation sets, a 16-word
// SPM and a synchronous active-low reset of the registers (not of the SPM).
module pdp1140_datapath
  import bus_pkg::*;
#(
  parameter int unsigned W         = 16,  // data path width
  parameter int unsigned BA_W      = 18,  // bus address width
  parameter int unsigned SPM_DEPTH = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  pdp_ctrl_t       ctrl,
  input  logic [W-1:0]    unibus_in,     // data from the UNIBUS
  output logic [W-1:0]    unibus_d_out,  // D register to the UNIBUS
  output logic [W-1:0]    unibus_ps_out, // PS register to the UNIBUS
  output logic [BA_W-1:0] bus_address,   // BA register
  output logic [W-1:0]    dpy_out,       // display register
  output logic [W-1:0]    ir_out,        // instruction register
  output logic [W-1:0]    bus1,
  output logic [W-1:0]    bus2,
  output logic [3:0]      cc,            // condition codes of the current ALU result
  output logic            bus1_conflict,
  output logic            bus2_conflict
);

  logic [W-1:0] spm_q, d_q, ps_q, b_q, baux_y, bmux_y, alu_y, bamux_y;
  logic [3:0]   psmux_y;
  logic [W-1:0] dpy_q, ir_q;
  logic [BA_W-1:0] ba_q;
  logic         alu_c, alu_v;

  // ---------------- BUS 1 ----------------
  // sink order: 0 DPY, 1 IR, 2 PS MUX, 3 SPM, 4 B
  logic [4:0][W-1:0] b1_sink;
  logic              b1_active;

  general_bus #(.W(W), .NSRC(3), .NSINK(5)) u_bus1 (
    .src_data  ({d_q, spm_q, unibus_in}),
    .src_gate  ({ctrl.b1_d, ctrl.b1_spm, ctrl.b1_unibus}),
    .sink_gate ({ctrl.ld_b, ctrl.spm_we, ctrl.ld_ps, ctrl.ld_ir, ctrl.ld_dpy}),
    .bus       (bus1),
    .sink_data (b1_sink),
    .active    (b1_active),
    .conflict  (bus1_conflict)
  );

  // ---------------- BUS 2 ----------------
  // sink order: 0 ALU left input (always open), 1 BA MUX
  logic [1:0][W-1:0] b2_sink;
  logic              b2_active;

  general_bus #(.W(W), .NSRC(2), .NSINK(2)) u_bus2 (
    .src_data  ({ps_q, spm_q}),
    .src_gate  ({ctrl.b2_ps, ctrl.b2_spm}),
    .sink_gate ({ctrl.ld_ba & ~ctrl.ba_sel, 1'b1}),
    .bus       (bus2),
    .sink_data (b2_sink),
    .active    (b2_active),
    .conflict  (bus2_conflict)
  );

  // ---------------- storage ----------------
  spm #(.W(W), .DEPTH(SPM_DEPTH)) u_spm (
    .clk   (clk),
    .addr  (ctrl.spm_addr[$clog2(SPM_DEPTH)-1:0]),
    .we    (ctrl.spm_we),
    .wdata (b1_sink[3]),
    .rdata (spm_q)
  );

  bus_reg #(.W(W)) u_dpy (.clk, .rst_n, .ld(ctrl.ld_dpy), .d(b1_sink[0]), .q(dpy_q));
  bus_reg #(.W(W)) u_ir  (.clk, .rst_n, .ld(ctrl.ld_ir),  .d(b1_sink[1]), .q(ir_q));
  bus_reg #(.W(W)) u_b   (.clk, .rst_n, .ld(ctrl.ld_b),   .d(b1_sink[4]), .q(b_q));
  bus_reg #(.W(W)) u_d   (.clk, .rst_n, .ld(ctrl.ld_d),   .d(alu_y),      .q(d_q));
  // PS: the upper bits load from BUS 1, the four condition-code bits from
  // the 4-bit PS MUX, so BUS 1 and the condition codes can load PS together.
  bus_reg #(.W(W-4)) u_ps_hi (.clk, .rst_n, .ld(ctrl.ld_ps), .d(b1_sink[2][W-1:4]), .q(ps_q[W-1:4]));
  bus_reg #(.W(4))   u_ps_lo (.clk, .rst_n, .ld(ctrl.ld_ps | ctrl.ld_cc), .d(psmux_y), .q(ps_q[3:0]));
  bus_reg #(.W(BA_W)) u_ba (.clk, .rst_n, .ld(ctrl.ld_ba), .d(BA_W'(bamux_y)), .q(ba_q));

  // ---------------- ALU and its operand paths ----------------
  b_aux #(.W(W)) u_baux (
    .op        (ctrl.baux_op),
    .const_val (ctrl.baux_const),
    .b         (b_q),
    .y         (baux_y)
  );

  mux_prim #(.W(W), .N(2)) u_bmux (
    .d   ({baux_y, b_q}),
    .sel (ctrl.bmux_sel),
    .en  (1'b1),
    .y   (bmux_y)
  );

  alu #(.W(W)) u_alu (
    .op       (ctrl.alu_op),
    .a        (b2_sink[0]),
    .b        (bmux_y),
    .y        (alu_y),
    .carry    (alu_c),
    .overflow (alu_v)
  );

  cond_codes #(.W(W)) u_cc (
    .y        (alu_y),
    .carry    (alu_c),
    .overflow (alu_v),
    .cc       (cc)
  );

  // ---------------- join-node multiplexers ----------------
  mux_prim #(.W(W), .N(2)) u_bamux (
    .d   ({alu_y, b2_sink[1]}),
    .sel (ctrl.ba_sel),
    .en  (1'b1),
    .y   (bamux_y)
  );

  mux_prim #(.W(4), .N(2)) u_psmux (
    .d   ({cc, b1_sink[2][3:0]}),
    .sel (ctrl.ld_cc),
    .en  (1'b1),
    .y   (psmux_y)
  );

  assign unibus_d_out  = d_q;
  assign unibus_ps_out = ps_q;
  assign bus_address   = ba_q;
  assign dpy_out       = dpy_q;
  assign ir_out        = ir_q;

  // Bus rules: only one source is allowed to be active at a time, and a sink
  // may only read a bus that some source drives.
  a_bus1_one_source: assert property (@(posedge clk) disable iff (!rst_n) !bus1_conflict)
    else $error("BUS 1: more than one source gate open");
  a_bus2_one_source: assert property (@(posedge clk) disable iff (!rst_n) !bus2_conflict)
    else $error("BUS 2: more than one source gate open");
  a_bus1_driven: assert property (@(posedge clk) disable iff (!rst_n)
      (ctrl.ld_dpy || ctrl.ld_ir || ctrl.ld_b || ctrl.spm_we || ctrl.ld_ps) |-> b1_active)
    else $error("BUS 1 read while no source drives it");
  a_bus2_driven: assert property (@(posedge clk) disable iff (!rst_n)
      (ctrl.ld_ba && !ctrl.ba_sel) |-> b2_active)
    else $error("BUS 2 read by BA MUX while no source drives it");

endmodule
