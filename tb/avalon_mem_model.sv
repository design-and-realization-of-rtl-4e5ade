// avalon_mem_model: behavioural model of the SDRAM behind its controller, as
// an Avalon-MM write slave (testbench only).
//
// Accepts 32-bit writes into a sparse word memory (mem, keyed by byte
// address).  When STALL is set, waitrequest is raised on a random third of
// the clocks, as a busy SDRAM controller would; n_stall counts the clocks a
// write was held off, n_write the completed writes.
module avalon_mem_model #(
  parameter bit STALL = 1
) (
  input  logic        clk,
  input  logic [31:0] address,
  input  logic        write,
  input  logic [31:0] writedata,
  input  logic [3:0]  byteenable,
  output logic        waitrequest
);
  logic [31:0] mem [int unsigned];
  int n_stall = 0, n_write = 0;

  initial waitrequest = 1'b0;
  always @(negedge clk) waitrequest = STALL ? ($urandom % 3 == 0) : 1'b0;

  always @(posedge clk) begin
    if (write && waitrequest) n_stall++;
    if (write && !waitrequest && byteenable == 4'hF) begin
      mem[address] = writedata;
      n_write++;
    end
  end
endmodule
