// tb_adc_readout: checks the per-cell ADC readout sequence: the cell token,
// the AN_RES / conversion / ADC_LD pulse lengths, the 64 multiplexer steps of
// 8 clocks (100 ns at 80 MHz, 6.4 us per cell) in card -> chip -> address
// order with one capture token at the end of each, and the total cell time.
`timescale 1ns/1ps
module tb_adc_readout;
  import ulm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #6.25 clk = ~clk;

  logic go = 0, busy, done, an_res, adc_clk, adc_res_n, adc_ld;
  logic [CELL_W-1:0] cell_no = 0;
  logic [3:0] adc_adr_n;
  logic [1:0] adc_oe, card_ena;
  token_t tok;

  adc_readout dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc = 0, t_go = -1, t_done = -1, t_cell = -1;
  int n_anres = 0, n_conv = 0, n_ld = 0, n_mux = 0, n_cap = 0, last_cap = -1, bad_dec = 0;
  int bad_order = 0, bad_gap = 0, n_adcclk = 0;
  logic prev_adc_clk = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && t_go >= 0 && t_done < 0) begin
      if (an_res) n_anres++;
      if (adc_res_n) n_conv++;
      if (adc_ld) n_ld++;
      if (card_ena != 0) n_mux++;
      if (adc_clk && !prev_adc_clk) n_adcclk++;
      if (tok.valid && tok.kind == TK_CELL) begin
        t_cell = cyc;
        check(tok.cell_no == 9'd301, "cell token carries the cell number");
        check(an_res, "cell token in AN_RES");
      end
      if (tok.valid && tok.kind == TK_CAPTURE) begin
        if (int'(tok.step) != n_cap) bad_order++;
        if (last_cap >= 0 && cyc - last_cap != 8) bad_gap++;
        // decode of the lines during the capture
        if (card_ena != (tok.step[5] ? 2'b10 : 2'b01) || adc_oe != (tok.step[4] ? 2'b10 : 2'b01)
            || adc_adr_n != ~tok.step[3:0]) bad_dec++;
        last_cap = cyc;
        n_cap++;
      end
      if (done) t_done = cyc;
    end
    prev_adc_clk <= adc_clk;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    check(!busy && adc_res_n == 0 && card_ena == 0 && adc_adr_n == 4'hF, "idle levels");
    @(negedge clk);
    cell_no = 9'd301;
    go = 1; t_go = cyc;   // sampled at the next edge, counted as cyc + 1
    @(negedge clk);
    go = 0; cell_no = 0;
    wait (t_done >= 0);
    @(posedge clk);
    check(n_anres == 4, $sformatf("AN_RES 4 clocks (%0d)", n_anres));
    check(n_conv == 34, $sformatf("ADC_RES released 34 clocks (%0d)", n_conv));
    check(n_ld == 2, $sformatf("ADC_LD 2 clocks (%0d)", n_ld));
    check(n_adcclk == 16, $sformatf("ADC_CLK 16 periods during conversion (%0d)", n_adcclk));
    check(n_mux == 512, $sformatf("multiplexer 512 clocks = 6.4 us (%0d)", n_mux));
    check(n_cap == 64, $sformatf("64 capture tokens (%0d)", n_cap));
    check(bad_order == 0, "steps in order");
    check(bad_gap == 0, "captures 8 clocks apart");
    check(bad_dec == 0, "card/chip/address decode");
    check(t_cell == t_go + 2, $sformatf("cell token in first clock after go (%0d)", t_cell - t_go));
    check(t_done - t_go == 563, $sformatf("cell takes 562 clocks (%0d)", t_done - t_go));
    @(posedge clk);
    check(!busy, "idle after done");
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
