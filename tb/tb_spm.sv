// tb_spm: self-checking test of the scratchpad memory: fills every word, then
// mixes random writes and reads and compares with a reference array.  Reads
// are combinational, writes take effect after the clock edge.
module tb_spm;
  localparam int W = 16, DEPTH = 16, AW = 4;
  logic clk = 0, we;
  logic [AW-1:0] addr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  spm #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = '0; wdata = '0;
    for (int i = 0; i < DEPTH; i++) begin
      addr = AW'(i); wdata = W'($urandom); we = 1; ref_mem[i] = wdata;
      @(posedge clk); #1;
    end
    for (int it = 0; it < 500; it++) begin
      addr = AW'($urandom); we = $urandom % 2; wdata = W'($urandom);
      #1;
      checks++;
      if (rdata !== ref_mem[addr]) begin failures++; $display("FAIL addr=%0d rd=%h exp=%h", addr, rdata, ref_mem[addr]); end
      @(posedge clk); #1;
      if (we) ref_mem[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
