// tb_ppac_lookback: the PPAC use case at the operating point of the original
// system. The SCA samples continuously at 25 ns; a detector pulse arrives and
// the trigger follows 1 us (80 clocks) later, as a slow trigger would. With a
// lookback of 46 cells (40 cells = 1 us of latency, plus 6 cells ahead of the
// pulse) and a 16-cell gate, the pulse peak of channel 0 must lie inside the
// cells read, with its full height. Every memory word is also
// compared with the samples the FEE model holds. Three triggers at different
// ring positions are run, including one whose gate wraps past cell 511.
`timescale 1ns/1ps
module tb_ppac_lookback;
  import ulm_pkg::*;

  localparam int MEM_DEPTH = 4096;
  localparam int AW = 12;
  localparam int CABLE = 6;

  logic clk = 0, rst_n = 0;
  always #6.25 clk = ~clk;

  logic        cam_n = 0, cam_s1 = 0, cam_s2 = 0, cam_z = 0, cam_c = 0, cam_i = 0;
  logic [3:0]  cam_a = 0;
  logic [4:0]  cam_f = 0;
  logic [23:0] cam_w = 0, cam_r;
  logic        cam_q, cam_x, cam_l;
  logic        trigger_in = 0, busy;
  fee_ctrl_t   fee_ctrl;
  logic [31:0] fee_data;
  logic [AW-1:0] mem_addr;
  logic [23:0] mem_wdata, mem_rdata;
  logic        mem_we, mem_re;
  longint      t_ref = 0;

  ulm_top #(.MEM_DEPTH(MEM_DEPTH)) dut (.*);
  fee_model #(.CABLE(CABLE)) u_fee (.clk, .ctrl(fee_ctrl), .t_ref, .data(fee_data));
  sram_model #(.DEPTH(MEM_DEPTH), .AW(AW)) u_mem (.clk, .addr(mem_addr), .wdata(mem_wdata),
                                                  .we(mem_we), .re(mem_re), .rdata(mem_rdata));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- CAMAC cycle: N,A,F,W set; S1 at 100 ns for 200 ns; S2 at 400 ns ----
  task automatic camac(input logic [4:0] f, input logic [3:0] a, input logic [23:0] w,
                       output logic [23:0] r, output logic q, output logic x);
    cam_n = 1; cam_f = f; cam_a = a; cam_w = w;
    repeat (8) @(posedge clk);
    cam_s1 = 1;
    repeat (8) @(posedge clk);
    r = cam_r; q = cam_q; x = cam_x;
    repeat (8) @(posedge clk);
    cam_s1 = 0;
    repeat (8) @(posedge clk);
    cam_s2 = 1;
    repeat (16) @(posedge clk);
    cam_s2 = 0;
    repeat (8) @(posedge clk);
    cam_n = 0;
    repeat (8) @(posedge clk);
  endtask

  task automatic cwrite(input logic [3:0] a, input logic [23:0] w);
    logic [23:0] r; logic q, x;
    camac(5'd16, a, w, r, q, x);
    check(x && q, $sformatf("F16 A%0d accepted", a));
  endtask

  task automatic cread(input logic [4:0] f, input logic [3:0] a, output logic [23:0] r);
    logic q, x;
    camac(f, a, 24'd0, r, q, x);
  endtask

  task automatic ccmd(input logic [4:0] f, input logic [3:0] a);
    logic [23:0] r; logic q, x;
    camac(f, a, 24'd0, r, q, x);
  endtask

  // ---- readout of the memory with a Q-stop loop --------------------------
  logic [23:0] words [$];
  int n_qstop = 0;
  task automatic read_memory();
    logic [23:0] r; logic q, x;
    words.delete();
    forever begin
      camac(5'd0, 4'd0, 24'd0, r, q, x);
      if (!q) break;
      words.push_back(r);
    end
    n_qstop++;
  endtask

  // ---- expected data -------------------------------------------------------
  int n_hits = 0, n_below = 0;
  function automatic int sig(int ch, longint t);
    int amp, pk, d, v;
    amp = 40 + (ch * 37) % 180;
    pk  = 280 + (ch % 16) * 3 + (ch / 64) * 7;
    d   = int'(t) - pk;
    if (d < 0) d = -d;
    v   = 5 + ch % 7;
    if (d < 40) v += amp * (40 - d) / 40;
    return (v > 255) ? 255 : v;
  endfunction

  // Expected words of one event: header, then per cell a cell word and the
  // hits in readout order {card, chip, address} outer, pair inner.
  task automatic expect_event(int evno, int first, int width, int thr, ref logic [23:0] exp[$]);
    int c, hits;
    exp.delete();
    exp.push_back({1'b1, 3'b000, 20'(evno)});
    hits = 0;
    for (int k = 0; k < width; k++) begin
      c = (first + k) % 512;
      exp.push_back({1'b1, 3'b001, 11'd0, 9'(c)});
      for (int s = 0; s < 64; s++)
        for (int p = 0; p < 4; p++) begin
          int ch, v;
          ch = p * 64 + s;
          v  = sig(ch, u_fee.stime[c] - t_ref);
          if (v > thr) begin
            exp.push_back({1'b0, 7'd0, 8'(ch), 8'(v - thr)});
            hits++;
          end else n_below++;
        end
    end
    exp.push_back({1'b1, 3'b010, 20'(hits)});
    n_hits += hits;
  endtask

  task automatic compare(string name, ref logic [23:0] exp[$]);
    int bad = 0;
    check(words.size() == exp.size(),
          $sformatf("%s: %0d words read, %0d expected", name, words.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < words.size(); i++)
      if (words[i] !== exp[i]) begin
        if (bad < 5) $display("  %s word %0d: got %06h expected %06h", name, i, words[i], exp[i]);
        bad++;
      end
    check(bad == 0, $sformatf("%s: %0d words differ", name, bad));
  endtask

  // ---- observation of the FEE lines --------------------------------------
  int mux_cycles = 0, n_rd_wraps = 0, n_wr_wraps = 0;
  fee_ctrl_t prev_ctrl;
  always @(posedge clk) begin
    if (fee_ctrl.card_ena != 0) mux_cycles++;
    if (!prev_ctrl.sr_res && fee_ctrl.sr_res && u_fee.ptr == 511) begin
      if (fee_ctrl.rw_mux) n_rd_wraps++;
      else                 n_wr_wraps++;
    end
    prev_ctrl <= fee_ctrl;
  end

  // sample spacing of the cells from..from+n-1
  task automatic check_spacing(int from, int n, int div);
    int bad = 0;
    for (int k = 1; k < n; k++) begin
      int c0, c1;
      c0 = (from + k - 1) % 512; c1 = (from + k) % 512;
      if (c1 != 0 && u_fee.stime[c1] - u_fee.stime[c0] != div) bad++;
    end
    check(bad == 0, $sformatf("cells written %0d clocks apart (%0d wrong)", div, bad));
  endtask

  task automatic wait_lam(int max_cycles);
    int n = 0;
    while (!cam_l && n < max_cycles) begin @(posedge clk); n++; end
    check(cam_l, "LAM after event");
  endtask

  logic [23:0] exp [$];
  logic [23:0] r;
  int n_peaks_found = 0;

  initial begin
    prev_ctrl = '{sca_clk: 1'b1, adc_adr_n: 4'hF, default: '0};
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    cwrite(4'd3, 24'd12);          // threshold
    cwrite(4'd4, 24'(CABLE - 2));  // return delay
    cwrite(4'd2, 24'd2);           // 25 ns sampling
    cwrite(4'd7, 24'd46);          // lookback: 1 us latency + 6 cells before
    cwrite(4'd6, 24'd16);          // gate width
    for (int ev = 0; ev < 3; ev++) begin
      int last, first, pos;
      int peak_ch0_cell;
      cwrite(4'd0, 24'(MODE_PPAC));
      // start the trigger at different ring positions; the last one wraps
      pos = (ev == 2) ? 505 : 100 + 150 * ev;
      wait (n_wr_wraps >= ev + 1);
      wait (u_fee.ptr == pos - 30);
      // channel 0 peaks 280 clocks after t_ref: 60 clocks (30 cells) from now.
      // Cells already written lie over 40 clocks before every pulse, so they
      // hold the baseline whichever t_ref is applied to them.
      t_ref = u_fee.now + 60 - 280;
      // trigger 1 us after the peak
      repeat (60 + 80) @(posedge clk);
      trigger_in = 1; repeat (4) @(posedge clk); trigger_in = 0;
      wait_lam(400000);
      last  = u_fee.last_store;
      first = (last - 46 + 512) % 512;
      read_memory();
      expect_event(0, first, 16, 12, exp);
      compare($sformatf("PPAC event %0d", ev), exp);
      // the peak of channel 0 is in the gate: the stored max equals amp+base-thr
      begin
        int best, bestc;
        best = -1; bestc = -1;
        for (int k = 0; k < 16; k++) begin
          int c, v;
          c = (first + k) % 512;
          v = u_fee.stored[c][0];
          if (v > best) begin best = v; bestc = k; end
        end
        check(bestc > 0 && bestc < 15, $sformatf("ev %0d: channel 0 peak inside the gate (cell %0d of 16)", ev, bestc));
        $display("event %0d: gate from cell %0d, channel 0 peak %0d in gate cell %0d", ev, first, best, bestc);
        check(best >= 5 + 40 - 2, $sformatf("ev %0d: channel 0 peak height %0d", ev, best));
        if (bestc > 0 && bestc < 15) n_peaks_found++;
      end
      ccmd(5'd10, 4'd0);
      cwrite(4'd0, 24'(MODE_OFF));
      ccmd(5'd9, 4'd0);
      ccmd(5'd10, 4'd0);
    end
    check(n_rd_wraps > 0, "a gate wrapped past the last cell");
    check(n_peaks_found == 3, "pulse found in all three events");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
