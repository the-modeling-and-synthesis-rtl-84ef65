// bus_systems_top: the bus-style data paths side by side.
//
// Two synthesized data paths, the PDP-11/10 data paths and the five canonical
// bus models are independent machines that share only the clock and reset:
//   pdp_*  PDP-11/40 data paths with two general buses (pdp1140_datapath)
//   hp_*   HP 2116 data paths with three buses (hp2116_datapath)
//   p10_*  PDP-11/10 data paths, one bus       (pdp1110_datapath)
//   m1_*   canonical one-bus model            (one_bus_model,   4 registers)
//   m2a_*  two-bus Model I                    (two_bus_model_1, 2 + 2 registers)
//   m2b_*  two-bus Model II                   (two_bus_model_2, 4 registers)
//   m3_*   canonical three-bus model          (three_bus_model, 2 + 2 registers)
//   m4_*   canonical four-bus model           (four_bus_model,  2 + 2 + 2 registers)
// Each machine takes one control word per clock from outside: the
// microprogrammed controllers that would produce them are not part of this
// design, nor are the UNIBUS and the memories, whose data ports are brought out.
// All data paths are 16 bits wide except the bus addresses (18) and the
// PDP-11/10 PS (8).  Timing is that of the individual blocks:
// every register transfer and every ALU operation completes at the next rising
// clock edge.
module bus_systems_top
  import bus_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  // PDP-11/40
  input  pdp_ctrl_t     pdp_ctrl,
  input  logic [W-1:0]  pdp_unibus_in,
  output logic [W-1:0]  pdp_unibus_d_out,
  output logic [W-1:0]  pdp_unibus_ps_out,
  output logic [17:0]   pdp_bus_address,
  output logic [W-1:0]  pdp_dpy_out,
  output logic [W-1:0]  pdp_ir_out,
  output logic [W-1:0]  pdp_bus1,
  output logic [W-1:0]  pdp_bus2,
  output logic [3:0]    pdp_cc,
  output logic          pdp_bus1_conflict,
  output logic          pdp_bus2_conflict,
  // HP 2116
  input  hp_ctrl_t      hp_ctrl,
  input  logic [W-1:0]  hp_mem_rdata,
  output logic [W-1:0]  hp_a,
  output logic [W-1:0]  hp_b,
  output logic [W-1:0]  hp_m,
  output logic [W-1:0]  hp_p,
  output logic [W-1:0]  hp_t,
  output logic [W-1:0]  hp_bus1,
  output logic [W-1:0]  hp_alu_out,
  output logic          hp_bus1_conflict,
  output logic          hp_bus2_conflict,
  // PDP-11/10
  input  pdp1110_ctrl_t p10_ctrl,
  input  logic [W-1:0]  p10_unibus_in,
  output logic [W-1:0]  p10_unibus_out,
  output logic [17:0]   p10_bus_address,
  output logic [W-1:0]  p10_ir_out,
  output logic [7:0]    p10_ps,
  output logic [W-1:0]  p10_bus,
  output logic [3:0]    p10_cc,
  input  logic [0:0][6:0]             m1_gate,
  input  logic [8:0][3:0]             m1_sel,
  input  logic [6:0]                  m1_ld,
  input  alu_op_e                     m1_alu_op,
  input  logic [W-1:0]                m1_ext_in,
  output logic [0:0][W-1:0]           m1_bus,
  output logic [0:0]                  m1_bus_conflict,
  output logic [6:0][W-1:0]           m1_q,
  output logic [W-1:0]                m1_alu_y,
  output logic                        m1_bad_sel,
  input  logic [1:0][6:0]             m2a_gate,
  input  logic [8:0][3:0]             m2a_sel,
  input  logic [6:0]                  m2a_ld,
  input  alu_op_e                     m2a_alu_op,
  input  logic [W-1:0]                m2a_ext_in,
  output logic [1:0][W-1:0]           m2a_bus,
  output logic [1:0]                  m2a_bus_conflict,
  output logic [6:0][W-1:0]           m2a_q,
  output logic [W-1:0]                m2a_alu_y,
  output logic                        m2a_bad_sel,
  input  logic [1:0][6:0]             m2b_gate,
  input  logic [8:0][3:0]             m2b_sel,
  input  logic [6:0]                  m2b_ld,
  input  alu_op_e                     m2b_alu_op,
  input  logic [W-1:0]                m2b_ext_in,
  output logic [1:0][W-1:0]           m2b_bus,
  output logic [1:0]                  m2b_bus_conflict,
  output logic [6:0][W-1:0]           m2b_q,
  output logic [W-1:0]                m2b_alu_y,
  output logic                        m2b_bad_sel,
  input  logic [2:0][6:0]             m3_gate,
  input  logic [8:0][3:0]             m3_sel,
  input  logic [6:0]                  m3_ld,
  input  alu_op_e                     m3_alu_op,
  input  logic [W-1:0]                m3_ext_in,
  output logic [2:0][W-1:0]           m3_bus,
  output logic [2:0]                  m3_bus_conflict,
  output logic [6:0][W-1:0]           m3_q,
  output logic [W-1:0]                m3_alu_y,
  output logic                        m3_bad_sel,
  input  logic [3:0][8:0]             m4_gate,
  input  logic [10:0][3:0]            m4_sel,
  input  logic [8:0]                  m4_ld,
  input  alu_op_e                     m4_alu_op,
  input  logic [W-1:0]                m4_ext_in,
  output logic [3:0][W-1:0]           m4_bus,
  output logic [3:0]                  m4_bus_conflict,
  output logic [8:0][W-1:0]           m4_q,
  output logic [W-1:0]                m4_alu_y,
  output logic                        m4_bad_sel
);

  pdp1140_datapath #(.W(W)) u_pdp (
    .clk, .rst_n,
    .ctrl          (pdp_ctrl),
    .unibus_in     (pdp_unibus_in),
    .unibus_d_out  (pdp_unibus_d_out),
    .unibus_ps_out (pdp_unibus_ps_out),
    .bus_address   (pdp_bus_address),
    .dpy_out       (pdp_dpy_out),
    .ir_out        (pdp_ir_out),
    .bus1          (pdp_bus1),
    .bus2          (pdp_bus2),
    .cc            (pdp_cc),
    .bus1_conflict (pdp_bus1_conflict),
    .bus2_conflict (pdp_bus2_conflict)
  );

  hp2116_datapath #(.W(W)) u_hp (
    .clk, .rst_n,
    .ctrl          (hp_ctrl),
    .mem_rdata     (hp_mem_rdata),
    .a_out         (hp_a),
    .b_out         (hp_b),
    .m_out         (hp_m),
    .p_out         (hp_p),
    .t_out         (hp_t),
    .bus1          (hp_bus1),
    .alu_out       (hp_alu_out),
    .bus1_conflict (hp_bus1_conflict),
    .bus2_conflict (hp_bus2_conflict)
  );

  pdp1110_datapath #(.W(W)) u_p10 (
    .clk, .rst_n,
    .ctrl          (p10_ctrl),
    .unibus_in     (p10_unibus_in),
    .unibus_out    (p10_unibus_out),
    .bus_address   (p10_bus_address),
    .ir_out        (p10_ir_out),
    .ps_out        (p10_ps),
    .bus           (p10_bus),
    .cc            (p10_cc)
  );

  one_bus_model #(.W(W)) u_m1 (
    .clk, .rst_n,
    .gate(m1_gate), .sel(m1_sel), .ld(m1_ld), .alu_op(m1_alu_op), .ext_in(m1_ext_in),
    .bus(m1_bus), .bus_conflict(m1_bus_conflict), .q(m1_q), .alu_y(m1_alu_y),
    .bad_sel(m1_bad_sel)
  );

  two_bus_model_1 #(.W(W)) u_m2a (
    .clk, .rst_n,
    .gate(m2a_gate), .sel(m2a_sel), .ld(m2a_ld), .alu_op(m2a_alu_op), .ext_in(m2a_ext_in),
    .bus(m2a_bus), .bus_conflict(m2a_bus_conflict), .q(m2a_q), .alu_y(m2a_alu_y),
    .bad_sel(m2a_bad_sel)
  );

  two_bus_model_2 #(.W(W)) u_m2b (
    .clk, .rst_n,
    .gate(m2b_gate), .sel(m2b_sel), .ld(m2b_ld), .alu_op(m2b_alu_op), .ext_in(m2b_ext_in),
    .bus(m2b_bus), .bus_conflict(m2b_bus_conflict), .q(m2b_q), .alu_y(m2b_alu_y),
    .bad_sel(m2b_bad_sel)
  );

  three_bus_model #(.W(W)) u_m3 (
    .clk, .rst_n,
    .gate(m3_gate), .sel(m3_sel), .ld(m3_ld), .alu_op(m3_alu_op), .ext_in(m3_ext_in),
    .bus(m3_bus), .bus_conflict(m3_bus_conflict), .q(m3_q), .alu_y(m3_alu_y),
    .bad_sel(m3_bad_sel)
  );

  four_bus_model #(.W(W)) u_m4 (
    .clk, .rst_n,
    .gate(m4_gate), .sel(m4_sel), .ld(m4_ld), .alu_op(m4_alu_op), .ext_in(m4_ext_in),
    .bus(m4_bus), .bus_conflict(m4_bus_conflict), .q(m4_q), .alu_y(m4_alu_y),
    .bad_sel(m4_bad_sel)
  );

endmodule
