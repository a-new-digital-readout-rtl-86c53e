// tb_event_builder: sends events of random items into a 32-word builder and
// checks every memory write (address, word format), the trailer hit count,
// event_done, the event counter, the overflow rule (writes stop at the memory
// size, flag set) and the clear.
`timescale 1ns/1ps
module tb_event_builder;
  import ulm_pkg::*;
  localparam int DEPTH = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0;
  item_t item;
  logic wr_en, overflow, event_done;
  logic [4:0] wr_addr;
  logic [23:0] wr_data;
  logic [5:0] wr_ptr;
  logic [19:0] event_count;
  event_builder #(.MEM_DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [23:0] expq [$];
  int exp_addr = 0, n_done = 0, n_writes = 0;
  always @(posedge clk) if (rst_n) begin
    if (wr_en) begin
      n_writes++;
      checks++;
      if (expq.size() == 0 || wr_data !== expq[0] || int'(wr_addr) != exp_addr) begin
        failures++;
        $display("FAIL: write %h at %0d, expected %h at %0d", wr_data, wr_addr,
                 expq.size() ? expq[0] : 24'h0, exp_addr);
      end
      if (expq.size()) void'(expq.pop_front());
      exp_addr++;
    end
    if (event_done) n_done++;
  end

  task automatic send(item_kind_e k, int c, int ch, int v);
    @(negedge clk);
    item = ITEM_NONE;
    item.valid = 1; item.kind = k; item.cell_no = 9'(c); item.channel = 8'(ch); item.value = 8'(v);
    @(negedge clk);
    item = ITEM_NONE;
  endtask

  task automatic event_(int evno, int ncells, int nhits, bit expect_store);
    int hits = 0;
    if (expect_store) expq.push_back({1'b1, 3'b000, 20'(evno)});
    send(IT_HEADER, 0, 0, 0);
    for (int c = 0; c < ncells; c++) begin
      int cc = $urandom_range(0, 511);
      if (expect_store) expq.push_back({1'b1, 3'b001, 11'd0, 9'(cc)});
      send(IT_CELL, cc, 0, 0);
      for (int h = 0; h < nhits; h++) begin
        int ch = $urandom_range(0, 255), v = $urandom_range(1, 255);
        if (expect_store) expq.push_back({1'b0, 7'd0, 8'(ch), 8'(v)});
        send(IT_HIT, cc, ch, v);
        hits++;
      end
    end
    if (expect_store) expq.push_back({1'b1, 3'b010, 20'(hits)});
    send(IT_TRAILER, 0, 0, 0);
  endtask

  initial begin
    item = ITEM_NONE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    event_(0, 2, 3, 1);          // 1 + 2*(1+3) + 1 = 10 words
    repeat (2) @(posedge clk);
    check(n_done == 1, "event_done after trailer");
    check(wr_ptr == 10, "write pointer 10");
    event_(1, 3, 4, 1);          // 1 + 3*5 + 1 = 17 words -> 27
    repeat (2) @(posedge clk);
    check(wr_ptr == 27 && !overflow, "27 words, no overflow");
    check(event_count == 2, "two events counted");
    // third event overflows: only the first 5 words fit
    event_(2, 2, 2, 1);          // 1 + 2*3 + 1 = 8 words, 5 fit
    repeat (2) @(posedge clk);
    check(overflow, "overflow flag");
    check(wr_ptr == DEPTH, "write pointer stops at memory size");
    check(n_writes == DEPTH, $sformatf("%0d writes (%0d)", DEPTH, n_writes));
    check(expq.size() == 3, $sformatf("5 words written, 3 dropped (%0d left)", expq.size()));
    expq.delete();
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    check(wr_ptr == 0 && !overflow && event_count == 0, "clear");
    exp_addr = 0;
    event_(0, 1, 2, 1);
    repeat (2) @(posedge clk);
    check(expq.size() == 0 && wr_ptr == 5, "writing again from address 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
