// hp2116_datapath: the HP 2116 data paths as allocated by the bus synthesis
// algorithm: three buses around registers A, B, M, P, T and one ALU.
//
//   Bus 1 (general bus)      sources: A, B, M, T, ALU output.
//                            sinks:   A, B, M, P, T.
//   Bus 2 (multiplexing bus) sources: A, B, P.  sink: ALU left input.
//   Bus 3 (single gate)      source:  T.        sink: ALU right input.
// The allocation puts the twelve transfers that never overlap with another
// transfer on the same source or sink (A->T, B->T, M->P, T->A/B/M/P and
// ALU->A/B/M/P/T) on Bus 1, the three transfers into the ALU's left input on
// Bus 2 and T->ALU on Bus 3.  So a microinstruction such as "A op T -> A, T"
// runs in one clock: A on Bus 2, T on Bus 3, the ALU result on Bus 1 with the
// sink gates of A and T open together.
//
// One control word (bus_pkg::hp_ctrl_t) per clock; transfers complete at the
// next rising edge.  The memory read port into M (`mem_rdata`, selected by
// `m_from_mem`) is this library's addition so that data can enter the machine:
// the transfer matrix of the source design covers only the registers and the
// ALU.  Widths (16 bits), the ALU operation set and the synchronous active-low
// reset are also this library's choices.
module hp2116_datapath
  import bus_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  hp_ctrl_t     ctrl,
  input  logic [W-1:0] mem_rdata,   // memory word for M
  output logic [W-1:0] a_out,
  output logic [W-1:0] b_out,
  output logic [W-1:0] m_out,       // memory data register
  output logic [W-1:0] p_out,       // program counter
  output logic [W-1:0] t_out,
  output logic [W-1:0] bus1,
  output logic [W-1:0] alu_out,
  output logic         bus1_conflict,
  output logic         bus2_conflict
);

  logic [W-1:0] a_q, b_q, m_q, p_q, t_q, alu_x, alu_y, alu_r, m_d;
  logic         alu_c, alu_v, b1_active;

  // Bus 1: sink order 0 A, 1 B, 2 M, 3 P, 4 T
  logic [4:0][W-1:0] b1_sink;

  general_bus #(.W(W), .NSRC(5), .NSINK(5)) u_bus1 (
    .src_data  ({alu_r, t_q, m_q, b_q, a_q}),
    .src_gate  ({ctrl.g1_alu, ctrl.g1_t, ctrl.g1_m, ctrl.g1_b, ctrl.g1_a}),
    .sink_gate ({ctrl.ld_t, ctrl.ld_p, ctrl.ld_m & ~ctrl.m_from_mem, ctrl.ld_b, ctrl.ld_a}),
    .bus       (bus1),
    .sink_data (b1_sink),
    .active    (b1_active),
    .conflict  (bus1_conflict)
  );

  // Bus 2: A, B, P -> ALU left input
  multiplexing_bus #(.W(W), .NSRC(3)) u_bus2 (
    .src_data ({p_q, b_q, a_q}),
    .src_gate ({ctrl.g2_p, ctrl.g2_b, ctrl.g2_a}),
    .out_gate (1'b1),
    .y        (alu_x),
    .conflict (bus2_conflict)
  );

  // Bus 3: T -> ALU right input, one gating element
  multiplexing_bus #(.W(W), .NSRC(1)) u_bus3 (
    .src_data (t_q),
    .src_gate (ctrl.g3_t),
    .out_gate (1'b1),
    .y        (alu_y),
    .conflict ()
  );

  alu #(.W(W)) u_alu (
    .op       (ctrl.alu_op),
    .a        (alu_x),
    .b        (alu_y),
    .y        (alu_r),
    .carry    (alu_c),
    .overflow (alu_v)
  );

  mux_prim #(.W(W), .N(2)) u_mmux (
    .d   ({mem_rdata, b1_sink[2]}),
    .sel (ctrl.m_from_mem),
    .en  (1'b1),
    .y   (m_d)
  );

  bus_reg #(.W(W)) u_a (.clk, .rst_n, .ld(ctrl.ld_a), .d(b1_sink[0]), .q(a_q));
  bus_reg #(.W(W)) u_b (.clk, .rst_n, .ld(ctrl.ld_b), .d(b1_sink[1]), .q(b_q));
  bus_reg #(.W(W)) u_m (.clk, .rst_n, .ld(ctrl.ld_m), .d(m_d),        .q(m_q));
  bus_reg #(.W(W)) u_p (.clk, .rst_n, .ld(ctrl.ld_p), .d(b1_sink[3]), .q(p_q));
  bus_reg #(.W(W)) u_t (.clk, .rst_n, .ld(ctrl.ld_t), .d(b1_sink[4]), .q(t_q));

  assign a_out   = a_q;
  assign b_out   = b_q;
  assign m_out   = m_q;
  assign p_out   = p_q;
  assign t_out   = t_q;
  assign alu_out = alu_r;

  a_bus1_one_source: assert property (@(posedge clk) disable iff (!rst_n) !bus1_conflict)
    else $error("Bus 1: more than one source gate open");
  a_bus2_one_source: assert property (@(posedge clk) disable iff (!rst_n) !bus2_conflict)
    else $error("Bus 2: more than one source gate open");
  a_bus1_driven: assert property (@(posedge clk) disable iff (!rst_n)
      (ctrl.ld_a || ctrl.ld_b || ctrl.ld_p || ctrl.ld_t || (ctrl.ld_m && !ctrl.m_from_mem)) |-> b1_active)
    else $error("Bus 1 read while no source drives it");

endmodule
