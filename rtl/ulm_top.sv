// ulm_top: digital readout controller for STAR-type front-end boards (FEE),
// as loaded into the FPGA of a CAMAC universal logic module.
//
// The FEE boards keep their analog memory (SCA) and ramp ADCs in use: this
// controller drives the 16 FEE control lines, reads the digitised samples back
// over a 32-bit bus (one byte per pair of boards, 8 boards, 256 channels),
// keeps only the values above a threshold and writes them into the module's
// static memory, from which the readout computer reads them over CAMAC.
//
//   trigger_in --sync--> fee_sequencer --go--> adc_readout --> fee_ctrl pins
//                             |   tokens           | tokens
//                             +--------+-----------+
//                                      v
//   fee_data --reg--------------> data_delay --> zero_suppress --> event_builder
//                                                                    | writes
//   CAMAC <--> camac_slave (registers, LAM, reads) <--> mem_ctrl <---+--> SRAM
//
// Modes (register A0): CRDC (triggered sampling, fixed gate start), CRDC2
// (gate start written by the readout program after the TDC has measured the
// drift time) and PPAC (continuous sampling, look back from the trigger).
// Timing: 80 MHz clock assumed; FEE control lines are registered once before
// the pins and fee_data once after them, so the delay register must cover the
// cable/board round trip plus these registers (see data_delay). The trigger is
// synchronised with two flip-flops and edge detected. busy is high while a
// trigger would not be accepted, including while the LAM is pending.
// The static memory itself is outside the FPGA: its port is brought out.
module ulm_top
  import ulm_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 1048576,
  localparam int unsigned MEM_AW = $clog2(MEM_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // CAMAC dataway
  input  logic              cam_n,
  input  logic [3:0]        cam_a,
  input  logic [4:0]        cam_f,
  input  logic              cam_s1,
  input  logic              cam_s2,
  input  logic              cam_z,
  input  logic              cam_c,
  input  logic              cam_i,
  input  logic [23:0]       cam_w,
  output logic [23:0]       cam_r,
  output logic              cam_q,
  output logic              cam_x,
  output logic              cam_l,
  // experiment
  input  logic              trigger_in,
  output logic              busy,
  // FEE interface board
  output fee_ctrl_t         fee_ctrl,
  input  logic [31:0]       fee_data,
  // static memory
  output logic [MEM_AW-1:0] mem_addr,
  output logic [MEM_DW-1:0] mem_wdata,
  output logic              mem_we,
  output logic              mem_re,
  input  logic [MEM_DW-1:0] mem_rdata
);

  cfg_t              cfg;
  logic              start_wr, rearm, sw_trigger, mem_clear, inhibit;
  logic              seq_busy, sampling;
  logic [MEM_AW:0]   wr_ptr;
  logic [19:0]       event_count;
  logic              overflow, event_done;
  logic              rd_req, rd_ack, rd_valid;
  logic [MEM_AW-1:0] rd_addr;
  logic [MEM_DW-1:0] rd_data;

  // ---- trigger -----------------------------------------------------------
  logic [2:0] trg_sy;
  logic       trigger;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) trg_sy <= '0;
    else        trg_sy <= {trg_sy[1:0], trigger_in};
  assign trigger = ((trg_sy[1] && !trg_sy[2]) || sw_trigger) && !inhibit;

  // ---- CAMAC -------------------------------------------------------------
  camac_slave #(.MEM_AW(MEM_AW)) u_camac (
    .clk, .rst_n,
    .cam_n, .cam_a, .cam_f, .cam_s1, .cam_s2, .cam_z, .cam_c, .cam_i, .cam_w,
    .cam_r, .cam_q, .cam_x, .cam_l,
    .cfg, .start_wr, .rearm, .sw_trigger, .mem_clear, .inhibit,
    .busy(seq_busy), .wr_ptr, .event_count, .overflow, .event_done,
    .rd_req, .rd_addr, .rd_ack, .rd_valid, .rd_data
  );

  // ---- sequencers --------------------------------------------------------
  logic              adc_go, adc_done, adc_busy;
  logic [CELL_W-1:0] adc_cell;
  token_t            seq_tok, adc_tok, tok, dly_tok;
  fee_ctrl_t         ctrl_d;

  fee_sequencer u_seq (
    .clk, .rst_n, .cfg, .trigger, .start_wr, .rearm,
    .adc_go, .adc_cell, .adc_done,
    .rw_mux(ctrl_d.rw_mux), .sca_clk(ctrl_d.sca_clk), .sr_res(ctrl_d.sr_res),
    .busy(seq_busy), .sampling, .tok(seq_tok)
  );

  adc_readout u_adc (
    .clk, .rst_n, .go(adc_go), .cell_no(adc_cell), .busy(adc_busy), .done(adc_done),
    .an_res(ctrl_d.an_res), .adc_clk(ctrl_d.adc_clk), .adc_res_n(ctrl_d.adc_res_n),
    .adc_ld(ctrl_d.adc_ld), .adc_adr_n(ctrl_d.adc_adr_n), .adc_oe(ctrl_d.adc_oe),
    .card_ena(ctrl_d.card_ena), .tok(adc_tok)
  );

  assign ctrl_d.sas_res = cfg.sas_res;

  // The two sequencers never emit a token in the same clock: the sequencer
  // only emits while the ADC sequencer is idle.
  assign tok = seq_tok.valid ? seq_tok : adc_tok;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) fee_ctrl <= '{sca_clk: 1'b1, adc_adr_n: 4'hF, default: '0};
    else        fee_ctrl <= ctrl_d;

  // ---- data path ---------------------------------------------------------
  logic [31:0] data_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) data_q <= '0;
    else        data_q <= fee_data;

  data_delay u_dly (.clk, .rst_n, .delay(cfg.delay), .in_tok(tok), .out_tok(dly_tok));

  item_t       item;
  logic [31:0] n_dropped;
  zero_suppress u_zs (
    .clk, .rst_n, .tok(dly_tok), .data(data_q), .threshold(cfg.threshold),
    .item, .n_dropped
  );

  logic              wr_en;
  logic [MEM_AW-1:0] wr_addr;
  logic [MEM_DW-1:0] wr_data;
  event_builder #(.MEM_DEPTH(MEM_DEPTH)) u_evb (
    .clk, .rst_n, .clear(mem_clear), .item,
    .wr_en, .wr_addr, .wr_data, .wr_ptr, .event_count, .overflow, .event_done
  );

  mem_ctrl #(.MEM_AW(MEM_AW)) u_mem (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_data,
    .rd_req, .rd_addr, .rd_ack, .rd_valid, .rd_data,
    .mem_addr, .mem_wdata, .mem_we, .mem_re, .mem_rdata
  );

  assign busy = seq_busy || cam_l;

  a_adc_go_idle: assert property (@(posedge clk) disable iff (!rst_n) adc_go |-> !adc_busy);

  a_tok_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
                                    !(seq_tok.valid && adc_tok.valid));

endmodule
