// two_bus_model_1: Model I of two-bus systems.
//
// Each ALU input has its own bus and its own group of registers: bus 0 serves
// registers 0 .. N1-1 and X0, bus 1 serves registers N1 .. N1+N2-1 and X1.
// Both operands can therefore be brought to the ALU in the same clock.  The
// ALU output register reads and drives both buses.
//
// Register indices: 0 .. NR-1 general and special registers, NR and NR+1 the
// working registers in front of the ALU (X0, X1), NR+2 the ALU output register
// (OUT).  Multiplexer NR+3 and NR+4 feed the ALU inputs.  The floating
// connections between broadcast trees and multiplexers are set by FLOAT (see
// bus_model_core, which also documents the control ports); none by default.
// Each register multiplexer has an external input ext_in.  One transfer per
// bus per clock; the default sizes are this library's choice, the source
// leaves them symbolic.
module two_bus_model_1
  import bus_pkg::*;
#(
  parameter int unsigned W  = 16,
  parameter int unsigned N1 = 2,
  parameter int unsigned N2 = 2,
  parameter int unsigned NR = N1 + N2,
  parameter logic [NR+3:0][NR+4:0] FLOAT = '0,
  parameter int unsigned SW = $clog2(2 + NR + 5)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [2-1:0][NR+2:0]    gate,
  input  logic [NR+4:0][SW-1:0]    sel,
  input  logic [NR+2:0]            ld,
  input  alu_op_e                  alu_op,
  input  logic [W-1:0]             ext_in,
  output logic [2-1:0][W-1:0]     bus,
  output logic [2-1:0]            bus_conflict,
  output logic [NR+2:0][W-1:0]     q,
  output logic [W-1:0]             alu_y,
  output logic                     bad_sel
);

  localparam int unsigned NBUS = 2;

  // Buses that register r (NR = X0, NR+1 = X1, NR+2 = OUT) drives.
  function automatic logic [NR+2:0][NBUS-1:0] gate_out_f();
    logic [NR+2:0][NBUS-1:0] g;
    for (int unsigned r = 0; r < NR + 3; r++) begin
      if (r < N1 || r == NR) g[r] = 2'b01;
      else if (r < NR + 2)   g[r] = 2'b10;
      else                   g[r] = 2'b11;
    end
    return g;
  endfunction

  // Buses that feed multiplexer m (the ALU input multiplexers take no bus).
  function automatic logic [NR+4:0][NBUS-1:0] bus_in_f();
    logic [NR+4:0][NBUS-1:0] g;
    g = '0;
    for (int unsigned r = 0; r < NR + 3; r++) begin
      if (r < N1 || r == NR) g[r] = 2'b01;
      else if (r < NR + 2)   g[r] = 2'b10;
      else                   g[r] = 2'b11;
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
