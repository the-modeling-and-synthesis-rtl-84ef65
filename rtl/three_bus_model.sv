// three_bus_model: canonical model of a three-bus system.
//
// Bus 0 is the common data bus, bus 1 IBUS1 and bus 2 IBUS2.  Each ALU input
// has a dedicated input bus: IBUS1 serves registers 0 .. N1-1 and X0, IBUS2
// registers N1 .. N1+N2-1 and X1.  Registers of both groups and the ALU output
// register also read and drive the common data bus, so three transfers can run
// in one clock.
//
// Register indices: 0 .. NR-1 general and special registers, NR and NR+1 the
// working registers in front of the ALU (X0, X1), NR+2 the ALU output register
// (OUT).  Multiplexer NR+3 and NR+4 feed the ALU inputs.  The floating
// connections between broadcast trees and multiplexers are set by FLOAT (see
// bus_model_core, which also documents the control ports); none by default.
// Each register multiplexer has an external input ext_in.  One transfer per
// bus per clock; the default sizes are this library's choice, the source
// leaves them symbolic.
module three_bus_model
  import bus_pkg::*;
#(
  parameter int unsigned W  = 16,
  parameter int unsigned N1 = 2,
  parameter int unsigned N2 = 2,
  parameter int unsigned NR = N1 + N2,
  parameter logic [NR+3:0][NR+4:0] FLOAT = '0,
  parameter int unsigned SW = $clog2(3 + NR + 5)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [3-1:0][NR+2:0]    gate,
  input  logic [NR+4:0][SW-1:0]    sel,
  input  logic [NR+2:0]            ld,
  input  alu_op_e                  alu_op,
  input  logic [W-1:0]             ext_in,
  output logic [3-1:0][W-1:0]     bus,
  output logic [3-1:0]            bus_conflict,
  output logic [NR+2:0][W-1:0]     q,
  output logic [W-1:0]             alu_y,
  output logic                     bad_sel
);

  localparam int unsigned NBUS = 3;

  // Buses that register r (NR = X0, NR+1 = X1, NR+2 = OUT) drives.
  function automatic logic [NR+2:0][NBUS-1:0] gate_out_f();
    logic [NR+2:0][NBUS-1:0] g;
    for (int unsigned r = 0; r < NR + 3; r++) begin
      if (r < N1)          g[r] = 3'b011;
      else if (r < NR)     g[r] = 3'b101;
      else if (r == NR)    g[r] = 3'b010;
      else if (r == NR+1)  g[r] = 3'b100;
      else                 g[r] = 3'b001;
    end
    return g;
  endfunction

  // Buses that feed multiplexer m (the ALU input multiplexers take no bus).
  function automatic logic [NR+4:0][NBUS-1:0] bus_in_f();
    logic [NR+4:0][NBUS-1:0] g;
    g = '0;
    for (int unsigned r = 0; r < NR + 3; r++) begin
      if (r < N1)          g[r] = 3'b011;
      else if (r < NR)     g[r] = 3'b101;
      else if (r == NR)    g[r] = 3'b010;
      else if (r == NR+1)  g[r] = 3'b100;
      else                 g[r] = 3'b001;
    end
    return g;
  endfunction

  bus_model_core #(
    .W(W), .NR(NR), .NBUS(NBUS),
    .GATE_OUT(gate_out_f()), .BUS_IN(bus_in_f()), .FLOAT(FLOAT), .SW(SW)
  ) u_core (
    .clk, .rst_n, .gate, .sel, .ld, .alu_op, .ext_in,
    .bus, .bus_conflict, .q, .alu_y, .bad_sel
  );

endmodule
