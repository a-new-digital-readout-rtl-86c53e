// mem_ctrl: single port of the static memory shared by writer and reader.
//
// The event builder's writes always win; CAMAC reads use the port in the
// clocks with no write. A read request is held by the requester until
// `rd_ack'; the data appear on `rd_data' with `rd_valid' one clock after the
// acknowledge (synchronous memory with one clock of read latency, an
// assumption of this design). Memory interface: mem_addr / mem_wdata / mem_we /
// mem_re out, mem_rdata in.
module mem_ctrl
  import ulm_pkg::*;
#(
  parameter int unsigned MEM_AW = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [MEM_AW-1:0] wr_addr,
  input  logic [MEM_DW-1:0] wr_data,
  input  logic              rd_req,
  input  logic [MEM_AW-1:0] rd_addr,
  output logic              rd_ack,
  output logic              rd_valid,
  output logic [MEM_DW-1:0] rd_data,
  output logic [MEM_AW-1:0] mem_addr,
  output logic [MEM_DW-1:0] mem_wdata,
  output logic              mem_we,
  output logic              mem_re,
  input  logic [MEM_DW-1:0] mem_rdata
);

  always_comb begin
    mem_we    = wr_en;
    mem_re    = !wr_en && rd_req;
    mem_addr  = wr_en ? wr_addr : rd_addr;
    mem_wdata = wr_data;
    rd_ack    = mem_re;
    rd_data   = mem_rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_valid <= 1'b0;
    else        rd_valid <= mem_re;
  end

  a_one_op: assert property (@(posedge clk) disable iff (!rst_n) !(mem_we && mem_re));

endmodule
