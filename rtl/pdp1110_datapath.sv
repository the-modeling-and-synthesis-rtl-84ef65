// pdp1110_datapath: the PDP-11/10 data paths, a one-bus machine.
//
// The PDP-11/10 is an instance of the canonical one-bus model: a single
// 16-bit path, the output of the DMUX, is broadcast to every register, and
// the ALU reads its operands through two multiplexers.
//   DMUX    chooses the ALU result or the data from the UNIBUS; its output is
//           the machine's one bus and also goes to the UNIBUS.
//   bus ->  BA (18-bit bus address), IR, PS (PS[3:0] through the PS MUX), SPM,
//           B.  Any number of them load in the same clock.
//   AMUX    chooses the ALU left input: SPM, PS (8 bits, zero-extended) or
//           A.AUX.
//   BMUX    chooses the ALU right input: B or B.AUX.
//   PS MUX  4-bit multiplexer choosing the bus or the condition codes of the
//           ALU result for PS[3:0]; PS[7:4] load from the bus.
//
// One control word (bus_pkg::pdp1110_ctrl_t) per clock.  Everything between
// the registers is combinational, so a whole microstep such as
// SPM[r] + B -> SPM[r] (AMUX, BMUX, ALU, DMUX, bus, SPM) completes at the next
// rising edge.  The SPM is addressed by one field for reading and writing.
//
// From the source design: the DMUX, AMUX, BMUX and PS MUX and their inputs,
// the registers fed by the bus, the 18-bit bus address, the 8-bit PS path into
// the AMUX, the 4-bit condition-code path and the 16-bit width of the other
// paths.  This design's choices: A.AUX as a 4-bit constant from the control
// word, the B.AUX operations, the ALU operations, the condition-code bit
// positions, zero extension of the bus to 18 bits for BA, a 16-word SPM, the
// control-word layout and a synchronous active-low reset of the registers
// (not of the SPM).
module pdp1110_datapath
  import bus_pkg::*;
#(
  parameter int unsigned W         = 16,  // data path width
  parameter int unsigned BA_W      = 18,  // bus address width
  parameter int unsigned PS_W      = 8,   // processor status width
  parameter int unsigned SPM_DEPTH = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  pdp1110_ctrl_t   ctrl,
  input  logic [W-1:0]    unibus_in,    // data from the UNIBUS
  output logic [W-1:0]    unibus_out,   // DMUX output to the UNIBUS
  output logic [BA_W-1:0] bus_address,  // BA register
  output logic [W-1:0]    ir_out,       // instruction register
  output logic [PS_W-1:0] ps_out,       // processor status
  output logic [W-1:0]    bus,          // DMUX output, the one bus
  output logic [3:0]      cc            // condition codes of the current ALU result
);

  logic [W-1:0]    spm_q, b_q, ir_q, aaux_y, baux_y, amux_y, bmux_y, alu_y;
  logic [PS_W-1:0] ps_q;
  logic [3:0]      psmux_y;
  logic [BA_W-1:0] ba_q;
  logic            alu_c, alu_v;

  // ---------------- DMUX: the single bus ----------------
  mux_prim #(.W(W), .N(2)) u_dmux (
    .d   ({unibus_in, alu_y}),
    .sel (ctrl.dmux_sel),
    .en  (1'b1),
    .y   (bus)
  );

  // ---------------- sinks of the bus ----------------
  spm #(.W(W), .DEPTH(SPM_DEPTH)) u_spm (
    .clk, .addr(ctrl.spm_addr[$clog2(SPM_DEPTH)-1:0]), .we(ctrl.spm_we), .wdata(bus), .rdata(spm_q)
  );
  bus_reg #(.W(W))    u_b  (.clk, .rst_n, .ld(ctrl.ld_b),  .d(bus),          .q(b_q));
  bus_reg #(.W(W))    u_ir (.clk, .rst_n, .ld(ctrl.ld_ir), .d(bus),          .q(ir_q));
  bus_reg #(.W(BA_W)) u_ba (.clk, .rst_n, .ld(ctrl.ld_ba), .d(BA_W'(bus)),   .q(ba_q));

  // PS: upper bits from the bus, the four condition-code bits through the PS MUX.
  mux_prim #(.W(4), .N(2)) u_psmux (
    .d   ({cc, bus[3:0]}),
    .sel (ctrl.ld_cc),
    .en  (1'b1),
    .y   (psmux_y)
  );
  bus_reg #(.W(PS_W-4)) u_ps_hi (.clk, .rst_n, .ld(ctrl.ld_ps), .d(bus[PS_W-1:4]), .q(ps_q[PS_W-1:4]));
  bus_reg #(.W(4))      u_ps_lo (.clk, .rst_n, .ld(ctrl.ld_ps | ctrl.ld_cc), .d(psmux_y), .q(ps_q[3:0]));

  // ---------------- ALU inputs ----------------
  assign aaux_y = W'(ctrl.aaux_const);

  mux_prim #(.W(W), .N(3)) u_amux (
    .d   ({aaux_y, W'(ps_q), spm_q}),
    .sel (ctrl.amux_sel),
    .en  (1'b1),
    .y   (amux_y)
  );

  b_aux #(.W(W)) u_baux (.op(ctrl.baux_op), .const_val(ctrl.baux_const), .b(b_q), .y(baux_y));

  mux_prim #(.W(W), .N(2)) u_bmux (
    .d   ({baux_y, b_q}),
    .sel (ctrl.bmux_sel),
    .en  (1'b1),
    .y   (bmux_y)
  );

  alu #(.W(W)) u_alu (
    .op       (ctrl.alu_op),
    .a        (amux_y),
    .b        (bmux_y),
    .y        (alu_y),
    .carry    (alu_c),
    .overflow (alu_v)
  );

  cond_codes #(.W(W)) u_cc (.y(alu_y), .carry(alu_c), .overflow(alu_v), .cc(cc));

  assign unibus_out  = bus;
  assign bus_address = ba_q;
  assign ir_out      = ir_q;
  assign ps_out      = ps_q;

  a_amux_sel: assert property (@(posedge clk) disable iff (!rst_n) ctrl.amux_sel != 2'd3)
    else $error("AMUX select %0d has no input", ctrl.amux_sel);

endmodule
