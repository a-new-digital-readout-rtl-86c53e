// tb_zero_suppress: random data words with capture tokens 8 clocks apart and
// random thresholds; the hit items must be exactly the bytes strictly above
// the threshold, in pair order, with channel {pair, step} and value minus
// threshold. Event start, cell and event end tokens must come out as header,
// cell and trailer items in order.
`timescale 1ns/1ps
module tb_zero_suppress;
  import ulm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  token_t tok;
  logic [31:0] data;
  logic [7:0] threshold;
  item_t item;
  logic [31:0] n_dropped;
  zero_suppress dut (.*);

  int checks = 0, failures = 0;
  item_t expq [$];
  int n_hits = 0, n_below = 0, n_other = 0;

  always @(posedge clk) if (rst_n && item.valid) begin
    checks++;
    if (expq.size() == 0) begin
      failures++; $display("FAIL: unexpected item %p", item);
    end else begin
      item_t e;
      e = expq.pop_front();
      if (item !== e) begin
        failures++;
        if (failures < 6) $display("FAIL: got %p exp %p", item, e);
      end
    end
  end

  task automatic send(token_t t);
    @(negedge clk);
    tok = t;
    @(negedge clk);
    tok = TOK_NONE;
    repeat (6) @(negedge clk);
  endtask

  initial begin
    tok = TOK_NONE; data = 0; threshold = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      token_t t;
      item_t e;
      t = TOK_NONE;
      t.valid = 1;
      t.cell_no = 9'($urandom);
      t.step = 6'($urandom);
      threshold = 8'($urandom_range(0, 120));
      case ($urandom_range(0, 5))
        0: t.kind = TK_EVENT_START;
        1: t.kind = TK_CELL;
        2: t.kind = TK_EVENT_END;
        default: t.kind = TK_CAPTURE;
      endcase
      e = ITEM_NONE;
      e.valid = 1;
      e.cell_no = t.cell_no;
      if (t.kind == TK_CAPTURE) begin
        @(negedge clk);
        data = $urandom;
        for (int p = 0; p < 4; p++) begin
          logic [7:0] b;
          b = data[8*p +: 8];
          if (b > threshold) begin
            e.kind = IT_HIT; e.channel = {2'(p), t.step}; e.value = b - threshold;
            expq.push_back(e); n_hits++;
          end else n_below++;
        end
      end else begin
        e.kind = (t.kind == TK_EVENT_START) ? IT_HEADER : (t.kind == TK_CELL) ? IT_CELL : IT_TRAILER;
        expq.push_back(e); n_other++;
      end
      send(t);
    end
    repeat (10) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL: %0d items missing", expq.size()); end
    checks++;
    if (n_dropped != 32'(n_below)) begin failures++; $display("FAIL: dropped count"); end
    checks++;
    if (n_hits == 0 || n_below == 0 || n_other == 0) failures++;
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
