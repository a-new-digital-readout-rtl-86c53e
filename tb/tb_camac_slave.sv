// tb_camac_slave: dataway cycles (N, A, F set; S1 at 100 ns; S2 at 400 ns)
// against the CAMAC slave with a memory model behind it. Checks reset
// defaults, F16/F1 register write and read-back for A0..A7, the start_wr
// pulse, X and Q responses (including X = 0 for an unknown function), the
// Q-stop memory readout with F0 A0 and the pointer reload with F17, F0 A1/A2,
// LAM set by event_done, F8 test, F10 clear with rearm pulse, F9 and C
// clears, F25 software trigger, inhibit, and Z restoring the defaults.
`timescale 1ns/1ps
module tb_camac_slave;
  import ulm_pkg::*;
  localparam int AW = 8;
  logic clk = 0, rst_n = 0;
  always #6.25 clk = ~clk;

  logic cam_n = 0, cam_s1 = 0, cam_s2 = 0, cam_z = 0, cam_c = 0, cam_i = 0;
  logic [3:0] cam_a = 0;
  logic [4:0] cam_f = 0;
  logic [23:0] cam_w = 0, cam_r;
  logic cam_q, cam_x, cam_l;
  cfg_t cfg;
  logic start_wr, rearm, sw_trigger, mem_clear, inhibit;
  logic busy = 0, overflow = 0, event_done = 0;
  logic [AW:0] wr_ptr = 0;
  logic [19:0] event_count = 20'd7;
  logic rd_req, rd_ack, rd_valid;
  logic [AW-1:0] rd_addr, mem_addr;
  logic [23:0] rd_data, mem_rdata;
  logic mem_re;

  camac_slave #(.MEM_AW(AW)) dut (.*);

  // memory: CAMAC reads only (the writer is modelled by preloading)
  assign mem_re = rd_req;
  assign rd_ack = rd_req;
  assign mem_addr = rd_addr;
  assign rd_data = mem_rdata;
  always_ff @(posedge clk) rd_valid <= rd_req;
  sram_model #(.DEPTH(256), .AW(AW)) u_mem (.clk, .addr(mem_addr), .wdata(24'd0), .we(1'b0),
                                            .re(mem_re), .rdata(mem_rdata));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_start_wr = 0, n_rearm = 0, n_swtrig = 0, n_clear = 0;
  always @(negedge clk) begin
    if (start_wr) n_start_wr++;
    if (rearm) n_rearm++;
    if (sw_trigger) n_swtrig++;
    if (mem_clear) n_clear++;
  end

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

  task automatic strobe_s2();   // dataway-wide Z or C cycle
    repeat (8) @(posedge clk); cam_s2 = 1; repeat (16) @(posedge clk); cam_s2 = 0;
    repeat (8) @(posedge clk);
  endtask

  logic [23:0] r; logic q, x;
  logic [23:0] vals [8];
  initial begin
    for (int i = 0; i < 256; i++) u_mem.mem[i] = 24'(i * 4099 + 17);
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    // defaults
    check(cfg.mode == MODE_OFF && cfg.n_samples == 510 && cfg.sample_div == 2 &&
          cfg.start == 135 && cfg.width == 12, "reset defaults");
    // registers
    vals = '{24'd2, 24'd300, 24'd5, 24'd33, 24'd9, 24'd77, 24'd40, 24'd11};
    for (int a = 0; a < 8; a++) begin
      camac(5'd16, 4'(a), vals[a], r, q, x);
      check(q && x, $sformatf("F16 A%0d Q X", a));
    end
    check(cfg.mode == MODE_PPAC && cfg.n_samples == 300 && cfg.sample_div == 5 &&
          cfg.threshold == 33 && cfg.delay == 9 && cfg.start == 77 && cfg.width == 40 &&
          cfg.lookback == 11, "registers loaded");
    check(n_start_wr == 1, "start_wr pulse on A5 write");
    for (int a = 0; a < 8; a++) begin
      camac(5'd1, 4'(a), 24'd0, r, q, x);
      check(r == vals[a] && q && x, $sformatf("F1 A%0d read back %0d", a, r));
    end
    camac(5'd16, 4'd0, 24'h4, r, q, x);
    check(cfg.sas_res && cfg.mode == MODE_CRDC, "SAS_RES bit");
    camac(5'd3, 4'd0, 24'd0, r, q, x);
    check(!x && !q, "unknown function: X = 0");
    // memory readout
    wr_ptr = 9'd5;
    camac(5'd0, 4'd1, 24'd0, r, q, x);
    check(r == 5, "F0 A1 write pointer");
    for (int i = 0; i < 5; i++) begin
      camac(5'd0, 4'd0, 24'd0, r, q, x);
      check(q && r == 24'(i * 4099 + 17), $sformatf("F0 A0 word %0d", i));
    end
    camac(5'd0, 4'd0, 24'd0, r, q, x);
    check(!q, "Q = 0 when all words read");
    wr_ptr = 9'd6;
    repeat (4) @(posedge clk);
    camac(5'd0, 4'd0, 24'd0, r, q, x);
    check(q && r == 24'(5 * 4099 + 17), "new word readable");
    camac(5'd17, 4'd0, 24'd2, r, q, x);
    camac(5'd0, 4'd0, 24'd0, r, q, x);
    check(q && r == 24'(2 * 4099 + 17), "F17 reloads read pointer");
    // status and LAM
    busy = 1; overflow = 1;
    camac(5'd0, 4'd2, 24'd0, r, q, x);
    check(r == {1'b1, 1'b0, 1'b1, 1'b0, 20'd7}, "F0 A2 status");
    camac(5'd8, 4'd0, 24'd0, r, q, x);
    check(!q && !cam_l, "no LAM yet");
    @(negedge clk); event_done = 1; @(negedge clk); event_done = 0;
    check(cam_l, "LAM on event_done");
    camac(5'd8, 4'd0, 24'd0, r, q, x);
    check(q, "F8 Q = LAM");
    camac(5'd10, 4'd0, 24'd0, r, q, x);
    check(!cam_l && n_rearm == 1, "F10 clears LAM and re-arms");
    camac(5'd9, 4'd0, 24'd0, r, q, x);
    check(n_clear == 1, "F9 clear pulse");
    camac(5'd0, 4'd0, 24'd0, r, q, x);
    check(q && r == 24'(17), "F9 resets read pointer");
    camac(5'd25, 4'd0, 24'd0, r, q, x);
    check(n_swtrig == 1, "F25 software trigger");
    cam_i = 1; repeat (4) @(posedge clk);
    check(inhibit, "I inhibits");
    cam_i = 0;
    @(negedge clk); event_done = 1; @(negedge clk); event_done = 0;
    cam_c = 1; strobe_s2(); cam_c = 0;
    check(!cam_l && n_clear == 2, "C clears");
    cam_z = 1; strobe_s2(); cam_z = 0;
    check(cfg.mode == MODE_OFF && cfg.n_samples == 510 && cfg.threshold == 0, "Z restores defaults");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
