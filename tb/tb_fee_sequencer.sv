// tb_fee_sequencer: drives the run-control sequencer with a stand-in for the
// ADC readout (done 20 clocks after go) and follows the SCA shift register
// from the SCA_CLK / SR_RES / RW_MUX lines it produces (16-cell array).
//  * CRDC: after the trigger, n_samples cells written sample_div clocks apart,
//    then read mode, reset, scroll to `start', cells start..start+width-1 read.
//  * CRDC2: no read phase before start_wr; then the written start is used.
//  * PPAC: continuous sampling with wrap, trigger, first cell read is
//    last-written - lookback (mod 16), read across the wrap.
// Also: event start / end tokens, busy until rearm.
`timescale 1ns/1ps
module tb_fee_sequencer;
  import ulm_pkg::*;
  localparam int CELLS = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_t cfg;
  logic trigger = 0, start_wr = 0, rearm = 0;
  logic adc_go, adc_done = 0;
  logic [CELL_W-1:0] adc_cell;
  logic rw_mux, sca_clk, sr_res, busy, sampling;
  token_t tok;

  fee_sequencer #(.SCA_CELLS(CELLS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // model of the SCA shift register
  int ptr = 0, last_written = -1, n_written = 0, last_wtime = -1, bad_period = 0, period = 2;
  int cyc = 0, n_wrap_w = 0, n_wrap_r = 0, n_ev_start = 0, n_ev_end = 0, ev_first = -1;
  int reads [$];
  logic p_sca = 1, p_sr = 0;
  always @(posedge clk) begin
    cyc++;
    if (p_sca && !sca_clk) begin
      if (!rw_mux) begin
        last_written = ptr; n_written++;
        if (last_wtime >= 0 && cyc - last_wtime != period) bad_period++;
        last_wtime = cyc;
      end
      ptr = (ptr + 1) % CELLS;
    end
    if (!p_sr && sr_res) begin
      if (!rw_mux && sampling) begin
        last_written = ptr; n_written++; n_wrap_w++;
        if (last_wtime >= 0 && cyc - last_wtime != period) bad_period++;
        last_wtime = cyc;
      end
      if (rw_mux && ptr == CELLS - 1) n_wrap_r++;
      ptr = 0;
    end
    if (adc_go) begin
      reads.push_back(int'(adc_cell));
      if (int'(adc_cell) != ptr) begin
        failures++; $display("FAIL: adc_cell %0d but SCA at %0d", adc_cell, ptr);
      end
    end
    if (tok.valid && tok.kind == TK_EVENT_START) begin n_ev_start++; ev_first = int'(tok.cell_no); end
    if (tok.valid && tok.kind == TK_EVENT_END) n_ev_end++;
    p_sca = sca_clk; p_sr = sr_res;
  end

  // ADC stand-in
  initial forever begin
    @(posedge clk);
    if (adc_go) begin
      repeat (19) @(posedge clk);
      adc_done <= 1;
      @(posedge clk);
      adc_done <= 0;
    end
  end

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  task automatic check_reads(int first, int width, string what);
    int bad = 0;
    check(reads.size() == width, $sformatf("%s: %0d cells read (%0d)", what, width, reads.size()));
    foreach (reads[i]) if (reads[i] != (first + i) % CELLS) bad++;
    check(bad == 0, $sformatf("%s: cells %0d.. in order", what, first));
  endtask

  initial begin
    cfg = '0;
    cfg.mode = MODE_OFF; cfg.n_samples = 10; cfg.sample_div = 4; cfg.start = 5;
    cfg.width = 3; cfg.lookback = 3;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);

    // ---- CRDC ----
    cfg.mode = MODE_CRDC; period = 4;
    repeat (3) @(posedge clk);
    check(!busy && !rw_mux && sca_clk, "idle: write mode, SCA_CLK high");
    pulse(trigger);
    @(posedge clk);
    check(busy, "busy after trigger");
    wait (n_ev_end == 1);
    repeat (3) @(posedge clk);
    check(n_written == 10, $sformatf("10 cells written (%0d)", n_written));
    check(last_written == 9, "cells 0..9 written");
    check(bad_period == 0, "sample period 4 clocks");
    check(ev_first == 5, "event start token carries first cell");
    check_reads(5, 3, "CRDC");
    check(busy, "busy until rearm");
    pulse(rearm);
    @(posedge clk);
    check(!busy, "idle after rearm");

    // ---- CRDC2 ----
    reads.delete(); n_written = 0; last_wtime = -1; period = 2;
    cfg.mode = MODE_CRDC2; cfg.sample_div = 2; cfg.n_samples = 12; cfg.width = 4;
    pulse(trigger);
    repeat (200) @(posedge clk);
    check(!rw_mux && reads.size() == 0, "CRDC2 waits for the start cell");
    check(n_written == 12, "CRDC2: 12 cells written");
    cfg.start = 9; pulse(start_wr);
    wait (n_ev_end == 2);
    check_reads(9, 4, "CRDC2");
    check(bad_period == 0, "sample period 2 clocks");
    pulse(rearm);

    // ---- PPAC ----
    reads.delete(); n_written = 0; last_wtime = -1; period = 2;
    cfg.mode = MODE_PPAC; cfg.width = 6; cfg.lookback = 3;
    repeat (100) @(posedge clk);
    check(!busy && sampling, "PPAC: sampling, ready for trigger");
    wait (ptr == 1);
    pulse(trigger);
    wait (n_ev_end == 3);
    check(n_wrap_w > 0, "PPAC sampling wrapped with SR_RES");
    check(ev_first == (last_written - 3 + CELLS) % CELLS, "PPAC first = last - lookback");
    check_reads((last_written - 3 + CELLS) % CELLS, 6, "PPAC");
    check(n_wrap_r > 0, "PPAC read wrapped");
    check(bad_period == 0, "PPAC sample period");
    cfg.mode = MODE_OFF;
    pulse(rearm);
    repeat (5) @(posedge clk);
    check(!busy && !sampling, "off");
    check(n_ev_start == 3, "three events");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
