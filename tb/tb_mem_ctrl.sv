// tb_mem_ctrl: random writes and held read requests into a memory model; a
// write is never delayed, a read is granted only in a clock with no write,
// and the data returned one clock after the grant equal the reference copy.
`timescale 1ns/1ps
module tb_mem_ctrl;
  localparam int AW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_req = 0, rd_ack, rd_valid, mem_we, mem_re;
  logic [AW-1:0] wr_addr = 0, rd_addr = 0, mem_addr;
  logic [23:0] wr_data = 0, rd_data, mem_wdata, mem_rdata;
  mem_ctrl #(.MEM_AW(AW)) dut (.*);
  sram_model #(.DEPTH(64), .AW(AW)) u_mem (.clk, .addr(mem_addr), .wdata(mem_wdata),
                                           .we(mem_we), .re(mem_re), .rdata(mem_rdata));
  int checks = 0, failures = 0;
  logic [23:0] ref_mem [64];
  logic [23:0] pending;
  bit has_pending = 0;
  int n_reads = 0, n_blocked = 0;

  initial begin
    for (int i = 0; i < 64; i++) ref_mem[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      // result of the previous grant
      if (has_pending) begin
        checks++;
        if (!rd_valid || rd_data !== pending) begin
          failures++; $display("FAIL: read data %h expected %h", rd_data, pending);
        end
        has_pending = 0;
      end
      wr_en = ($urandom_range(0, 2) == 0);
      wr_addr = AW'($urandom); wr_data = 24'($urandom);
      if (!rd_req || rd_ack === 1'b1) begin
        rd_req = $urandom_range(0, 1);
        rd_addr = AW'($urandom);
      end
      #1;
      checks++;
      if (mem_we !== wr_en || (wr_en && (mem_addr !== wr_addr || mem_wdata !== wr_data))) begin
        failures++; $display("FAIL: write not passed through");
      end
      checks++;
      if (rd_ack !== (rd_req && !wr_en) || (rd_ack && mem_addr !== rd_addr)) begin
        failures++; $display("FAIL: read grant");
      end
      if (rd_req && wr_en) n_blocked++;
      if (rd_ack) begin pending = ref_mem[rd_addr]; has_pending = 1; n_reads++; end
      @(posedge clk);
      if (wr_en) ref_mem[wr_addr] = wr_data;
      #1;
      if (rd_ack === 1'b1) rd_req = 0;
    end
    checks++;
    if (n_reads == 0 || n_blocked == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
