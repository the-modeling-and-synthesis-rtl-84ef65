// bus_reg: a storage element of a bus-style data path (general or special
// register).
//
// The register captures `d` on the rising clock edge when `ld` is high and
// holds its value otherwise.  An active-low synchronous reset loads RESET_VAL.
// Its output feeds a wired-broadcast tree, i.e. it may fan out to any number of
// destinations at once.
//
// Timing: one clock from `d` to `q`.
module bus_reg #(
  parameter int unsigned W         = 16,
  parameter logic [W-1:0] RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ld,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= RESET_VAL;
    else if (ld) q <= d;
  end

endmodule
