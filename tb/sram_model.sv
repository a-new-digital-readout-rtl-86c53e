// sram_model: the module's static memory as seen by the FPGA, for simulation.
// Synchronous single port: a write when `we', a read when `re' whose data
// appear on `rdata' in the next clock. Contents start at zero.
module sram_model #(
  parameter int unsigned DEPTH = 1048576,
  parameter int unsigned AW    = 20,
  parameter int unsigned DW    = 24
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  input  logic          we,
  input  logic          re,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];
  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
    rdata = '0;
  end
  always @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (re) rdata <= mem[addr];
  end
endmodule
