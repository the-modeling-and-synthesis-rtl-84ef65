// spm: the scratchpad memory (SPM) of the PDP-11/40 and PDP-11/10
// data paths.
//
// A DEPTH x W register file with one address shared by its read and write
// port.  Reading is combinational: the addressed word is available in the same
// cycle to the gating elements that put it on BUS 1 or BUS 2.  Writing happens
// on the rising clock edge when `we` is high, from BUS 1.  The contents are not
// reset.  Depth 16 is this library's choice (the general registers of both
// register sets plus temporaries); the source design only names the SPM.
//
// Timing: read combinational, write one clock.
module spm #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
