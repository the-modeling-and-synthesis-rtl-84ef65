// bus_pkg: types and constants shared by the bus-style data paths.
//
// The data paths in this library are built from a small set of primitives
// (general bus, multiplexing bus, multiplexer, register, ALU).  Each data path
// is controlled by a control word that a microprogram would supply once per
// clock cycle; the control words of the PDP-11/40, PDP-11/10 and HP 2116 data
// paths are defined here as packed structs so that a controller, a testbench
// and the top level all agree on the field layout.
//
// The ALU operation set, the B.AUX operation set and the field layout of the
// control words are this library's own choices: the source design names the
// ALU, the A.AUX and the B.AUX units but does not list their operations.
package bus_pkg;

  // ALU operations (3-bit code).  A is the left operand, B the right one.
  typedef enum logic [2:0] {
    ALU_ADD    = 3'd0,  // A + B
    ALU_SUB    = 3'd1,  // A - B
    ALU_AND    = 3'd2,  // A & B
    ALU_OR     = 3'd3,  // A | B
    ALU_XOR    = 3'd4,  // A ^ B
    ALU_BIC    = 3'd5,  // A & ~B (bit clear)
    ALU_PASS_A = 3'd6,  // A
    ALU_PASS_B = 3'd7   // B
  } alu_op_e;

  // B.AUX operations: constants, sign extension and byte swap of the B register.
  typedef enum logic [1:0] {
    BAUX_CONST = 2'd0,  // zero-extended 4-bit constant from the control word
    BAUX_SXT   = 2'd1,  // low byte of B, sign-extended
    BAUX_SWAB  = 2'd2,  // B with its two bytes swapped
    BAUX_HIGH  = 2'd3   // high byte of B, zero-extended
  } baux_op_e;

  // Control word of the PDP-11/40 data path (one per clock cycle).
  typedef struct packed {
    // gating elements onto BUS 1 (at most one may be open)
    logic     b1_unibus;   // UNIBUS receivers -> BUS 1
    logic     b1_spm;      // SPM drivers      -> BUS 1
    logic     b1_d;        // D register       -> BUS 1
    // gating elements onto BUS 2 (at most one may be open)
    logic     b2_spm;      // SPM              -> BUS 2
    logic     b2_ps;       // PS               -> BUS 2
    // scratchpad
    logic [3:0] spm_addr;  // SPM word address (read and write)
    logic     spm_we;      // BUS 1 -> SPM (receivers)
    // register loads
    logic     ld_dpy;      // BUS 1 -> display register
    logic     ld_ir;       // BUS 1 -> IR
    logic     ld_b;        // BUS 1 -> B
    logic     ld_d;        // ALU   -> D
    logic     ld_ba;       // BA MUX -> BA
    logic     ld_ps;       // BUS 1 -> PS (PS[3:0] through the PS MUX unless ld_cc)
    logic     ld_cc;       // condition codes -> PS MUX -> PS[3:0]
    logic     bmux_sel;    // BMUX: 0 = B, 1 = B.AUX
    baux_op_e baux_op;
    logic [3:0] baux_const;
    logic     ba_sel;      // BA MUX: 0 = BUS 2, 1 = ALU output
    alu_op_e  alu_op;
  } pdp_ctrl_t;

  // Control word of the HP 2116 data path (one per clock cycle).
  typedef struct packed {
    // gating elements onto the general bus (at most one may be open)
    logic    g1_a, g1_b, g1_m, g1_t, g1_alu;
    // receivers from the general bus
    logic    ld_a, ld_b, ld_m, ld_p, ld_t;
    // M loaded from the memory read port instead of the bus
    logic    m_from_mem;
    // gating elements onto the multiplexing bus in front of the ALU's left input
    logic    g2_a, g2_b, g2_p;
    // gating element between T and the ALU's right input
    logic    g3_t;
    alu_op_e alu_op;
  } hp_ctrl_t;

  // AMUX selects of the PDP-11/10 data path.
  typedef enum logic [1:0] {
    AMUX_SPM  = 2'd0,  // scratchpad word
    AMUX_PS   = 2'd1,  // PS, zero-extended
    AMUX_AAUX = 2'd2   // A.AUX constant
  } amux_sel_e;

  // Control word of the PDP-11/10 data path (one per clock cycle).
  typedef struct packed {
    logic       dmux_sel;    // DMUX: 0 = ALU output, 1 = data from the UNIBUS
    logic [3:0] spm_addr;    // SPM word address (read and write)
    logic       spm_we;      // DMUX output -> SPM
    logic       ld_ba;       // DMUX output -> BA
    logic       ld_ir;       // DMUX output -> IR
    logic       ld_b;        // DMUX output -> B
    logic       ld_ps;       // DMUX output -> PS (PS[3:0] through the PS MUX unless ld_cc)
    logic       ld_cc;       // condition codes -> PS MUX -> PS[3:0]
    amux_sel_e  amux_sel;
    logic [3:0] aaux_const;  // A.AUX constant
    logic       bmux_sel;    // BMUX: 0 = B, 1 = B.AUX
    baux_op_e   baux_op;
    logic [3:0] baux_const;
    alu_op_e    alu_op;
  } pdp1110_ctrl_t;

endpackage
