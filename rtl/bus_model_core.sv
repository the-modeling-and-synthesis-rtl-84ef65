// bus_model_core: the common structure of the canonical bus models around a
// single centralized ALU.
//
// Elements ("square blocks") and their indices:
//   registers 0 .. NR-1   general and special registers
//   register  NR, NR+1    the working registers in front of the ALU (X0, X1)
//   register  NR+2        the register at the ALU output (OUT)
// Every register has a multiplexer in front of it and a wired-broadcast tree
// behind it.  Two more multiplexers feed the ALU inputs (mux NR+3 = left,
// NR+4 = right), and the ALU output has its own broadcast tree, tree NR+3.
// That gives NR+5 multiplexers and NR+4 broadcast trees.
//
// Fixed connections: tree NR (X0) -> mux NR+3, tree NR+1 (X1) -> mux NR+4,
// tree NR+3 (ALU) -> mux NR+2 (OUT).  Bus attachment is set by two parameters:
//   GATE_OUT[r][b]  register r has a gating element driving bus b
//   BUS_IN[m][b]    bus b is an input of multiplexer m
// and the "floating" connections by FLOAT[t][m]: broadcast tree t is an input
// of multiplexer m.  A tree never feeds its own register's multiplexer and the
// ALU output never feeds the ALU input multiplexers; such FLOAT bits are
// ignored.  Each register multiplexer also has one external input, `ext_in`,
// standing for a floating input from outside the model (memory, I/O).
//
// Control, once per clock:
//   gate[b][r]  open the gate of register r onto bus b (at most one per bus)
//   sel[m]      multiplexer input: 0..NBUS-1 = bus, NBUS+t = broadcast tree t,
//               NBUS+NR+4 = ext_in
//   ld[r]       load register r from its multiplexer at the rising edge
//   alu_op      ALU operation (combinational, from muxes NR+3 and NR+4)
// `bad_sel` flags a loading register, or an ALU input in use, whose
// multiplexer selects an input that this configuration does not connect.
//
// Timing: one transfer register -> bus -> register per clock; an ALU operation
// X0 op X1 -> OUT also takes one clock.
module bus_model_core
  import bus_pkg::*;
#(
  parameter int unsigned W    = 16,
  parameter int unsigned NR   = 4,
  parameter int unsigned NBUS = 1,
  parameter logic [NR+2:0][NBUS-1:0] GATE_OUT = '1,
  parameter logic [NR+4:0][NBUS-1:0] BUS_IN   = {{2{NBUS'(0)}}, {(NR+3){{NBUS{1'b1}}}}},
  parameter logic [NR+3:0][NR+4:0]   FLOAT    = '0,
  parameter int unsigned NCAND = NBUS + NR + 5,
  parameter int unsigned SW    = $clog2(NCAND)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NBUS-1:0][NR+2:0]    gate,
  input  logic [NR+4:0][SW-1:0]      sel,
  input  logic [NR+2:0]              ld,
  input  alu_op_e                    alu_op,
  input  logic [W-1:0]               ext_in,
  output logic [NBUS-1:0][W-1:0]     bus,
  output logic [NBUS-1:0]            bus_conflict,
  output logic [NR+2:0][W-1:0]       q,
  output logic [W-1:0]               alu_y,
  output logic                       bad_sel
);

  localparam int unsigned NREG = NR + 3;  // registers incl. X0, X1, OUT
  localparam int unsigned NMUX = NR + 5;
  localparam int unsigned NTREE = NR + 4;
  localparam int unsigned X0 = NR, X1 = NR + 1, OUTR = NR + 2;
  localparam int unsigned MUX_A = NR + 3, MUX_B = NR + 4, TREE_ALU = NR + 3;
  localparam int unsigned EXT = NBUS + NR + 4;

  // Is broadcast tree t an input of multiplexer m?
  function automatic logic tree_feeds(int unsigned t, int unsigned m);
    if (t == m && m < NREG)                       return 1'b0;  // own input
    if (t == TREE_ALU && (m == MUX_A || m == MUX_B)) return 1'b0;  // ALU loop
    if (t == X0 && m == MUX_A)                    return 1'b1;
    if (t == X1 && m == MUX_B)                    return 1'b1;
    if (t == TREE_ALU && m == OUTR)               return 1'b1;
    return FLOAT[t][m];
  endfunction

  // Connectivity of every multiplexer input.
  function automatic logic [NMUX-1:0][NCAND-1:0] conn_f();
    logic [NMUX-1:0][NCAND-1:0] c;
    c = '0;
    for (int unsigned m = 0; m < NMUX; m++) begin
      for (int unsigned b = 0; b < NBUS; b++) c[m][b] = BUS_IN[m][b];
      for (int unsigned t = 0; t < NTREE; t++) c[m][NBUS+t] = tree_feeds(t, m);
      c[m][EXT] = (m < NREG);
    end
    return c;
  endfunction

  localparam logic [NMUX-1:0][NCAND-1:0] CONN = conn_f();

  logic [NTREE-1:0][W-1:0] tree;
  logic [NMUX-1:0][W-1:0]  mux_y;
  logic [NMUX-1:0]         legal;
  logic [W-1:0]            alu_a, alu_b;
  logic                    alu_c, alu_v;

  // ---------------- buses ----------------
  for (genvar b = 0; b < NBUS; b++) begin : g_bus
    logic [NREG-1:0] g;
    for (genvar r = 0; r < NREG; r++) begin : g_gate
      assign g[r] = gate[b][r] & GATE_OUT[r][b];
    end
    general_bus #(.W(W), .NSRC(NREG), .NSINK(1)) u_bus (
      .src_data  (q),
      .src_gate  (g),
      .sink_gate (1'b1),
      .bus       (bus[b]),
      .sink_data (),
      .active    (),
      .conflict  (bus_conflict[b])
    );
  end

  // ---------------- broadcast trees ----------------
  for (genvar t = 0; t < NREG; t++) begin : g_tree
    assign tree[t] = q[t];
  end
  assign tree[TREE_ALU] = alu_y;

  // ---------------- multiplexers ----------------
  for (genvar m = 0; m < NMUX; m++) begin : g_mux
    logic [NCAND-1:0][W-1:0] cand;
    always_comb begin
      for (int unsigned k = 0; k < NCAND; k++) begin
        if (!CONN[m][k])         cand[k] = '0;
        else if (k < NBUS)       cand[k] = bus[k];
        else if (k < EXT)        cand[k] = tree[k-NBUS];
        else                     cand[k] = ext_in;
      end
    end
    assign legal[m] = (32'(sel[m]) < NCAND) && CONN[m][sel[m]];
    mux_prim #(.W(W), .N(NCAND), .SELW(SW)) u_mux (
      .d   (cand),
      .sel (sel[m]),
      .en  (1'b1),
      .y   (mux_y[m])
    );
  end

  // ---------------- registers ----------------
  for (genvar r = 0; r < NREG; r++) begin : g_reg
    bus_reg #(.W(W)) u_reg (
      .clk, .rst_n,
      .ld (ld[r]),
      .d  (mux_y[r]),
      .q  (q[r])
    );
  end

  // ---------------- ALU ----------------
  assign alu_a = mux_y[MUX_A];
  assign alu_b = mux_y[MUX_B];

  alu #(.W(W)) u_alu (
    .op       (alu_op),
    .a        (alu_a),
    .b        (alu_b),
    .y        (alu_y),
    .carry    (alu_c),
    .overflow (alu_v)
  );

  // The ALU result is used when a loading register selects the ALU tree.
  logic alu_used;
  always_comb begin
    alu_used = 1'b0;
    bad_sel  = 1'b0;
    for (int unsigned r = 0; r < NREG; r++) begin
      if (ld[r] && 32'(sel[r]) == NBUS + TREE_ALU) alu_used = 1'b1;
      if (ld[r] && !legal[r])                       bad_sel  = 1'b1;
    end
    if (alu_used && !(legal[MUX_A] && legal[MUX_B])) bad_sel = 1'b1;
  end

  for (genvar b = 0; b < NBUS; b++) begin : g_assert
    a_one_source: assert property (@(posedge clk) disable iff (!rst_n) !bus_conflict[b])
      else $error("bus %0d: more than one source gate open", b);
  end

endmodule
