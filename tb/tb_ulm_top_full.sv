// tb_ulm_top_full: one complete CRDC event through the controller with every
// parameter at its default (1M-word memory, 512-cell SCA), driven through
// CAMAC as a readout program would: threshold and delay are loaded, the mode
// set, a trigger given; the controller samples 510 cells at 25 ns, reads the
// 12-cell gate from cell 135 and raises the LAM; the memory is read back with
// a Q-stop F0 loop and compared word by word with the samples the FEE model
// stored. Also checks the sample spacing and the 6.4 us multiplexer time per
// cell.
`timescale 1ns/1ps
module tb_ulm_top_full;
  import ulm_pkg::*;

  localparam int MEM_DEPTH = 1048576;
  localparam int AW = 20;
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

  ulm_top dut (.*);
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
  int n_lam = 0, n_crdc2_wait = 0, n_overflow = 0;
  int mc0;

  initial begin
    prev_ctrl = '{sca_clk: 1'b1, adc_adr_n: 4'hF, default: '0};
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);

    // ---------------- 1. CRDC event ----------------
    cread(5'd1, 4'd1, r); check(r == 24'd510, "default total samples 510");
    cread(5'd1, 4'd5, r); check(r == 24'd135, "default start 135");
    cread(5'd1, 4'd6, r); check(r == 24'd12,  "default width 12");
    cwrite(4'd3, 24'd20);          // threshold
    cwrite(4'd4, 24'(CABLE - 2));  // return delay
    cwrite(4'd0, 24'(MODE_CRDC));
    check(!busy, "idle before trigger");
    @(posedge clk); t_ref = u_fee.now + 4;   // trigger reaches the sequencer after sync
    trigger_in = 1; repeat (4) @(posedge clk); trigger_in = 0;
    mc0 = mux_cycles;
    wait_lam(200000); if (cam_l) n_lam++;
    check(mux_cycles - mc0 == 12 * 512, $sformatf("multiplexer time %0d clocks for 12 cells",
                                                  mux_cycles - mc0));
    check(u_fee.n_short_conv == 0, "ADC conversions long enough");
    check_spacing(0, 510, 2);
    check(u_fee.stime[509] - u_fee.stime[0] == 509 * 2, "510 samples in 12.75 us");
    read_memory();
    expect_event(0, 135, 12, 20, exp);
    compare("CRDC", exp);
    cread(5'd0, 4'd1, r); check(r == 24'(exp.size()), "write pointer = words of event");
    cread(5'd0, 4'd2, r); check(r[19:0] == 20'd1, "one event counted");
    ccmd(5'd10, 4'd0);
    ccmd(5'd9, 4'd0);

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
