// tb_data_delay: random token stream; for each delay setting 0..15 every
// output token must equal the input token exactly `delay' clocks earlier.
`timescale 1ns/1ps
module tb_data_delay;
  import ulm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0] delay = 0;
  token_t in_tok, out_tok;
  data_delay dut (.*);

  int checks = 0, failures = 0;
  token_t hist [0:63];
  initial begin
    in_tok = TOK_NONE;
    for (int i = 0; i < 64; i++) hist[i] = TOK_NONE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int d = 0; d <= 15; d++) begin
      delay = 4'(d);
      for (int t = 0; t < 60; t++) begin
        @(negedge clk);
        in_tok = token_t'($urandom);
        in_tok.valid = $urandom_range(0, 1);
        #1;
        for (int i = 63; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = in_tok;
        if (t >= 16) begin
          checks++;
          if (out_tok !== hist[d]) begin
            failures++;
            if (failures < 5) $display("FAIL: delay %0d t %0d got %h exp %h", d, t, out_tok, hist[d]);
          end
        end
      end
    end
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
