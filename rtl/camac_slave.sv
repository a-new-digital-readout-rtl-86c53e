// camac_slave: CAMAC dataway interface of the readout module.
//
// All run parameters are registers loaded by CAMAC commands, and the event
// data are read from the static memory by CAMAC commands; the logic module
// provides no interface of its own, so this block implements the dataway
// slave. The strobes S1/S2 and Z, C, I are synchronised to the clock with two
// flip-flops; N, A, F and W are stable during a command and are sampled at
// the synchronised strobe edges. Register writes take effect at S1, actions
// (read-pointer advance, clears) at S2. R, Q and X are decoded continuously
// while N is asserted so that they are valid when the controller samples them
// at S1; the memory word at the read pointer is prefetched for this.
//
// Functions (A = subaddress):
//   F0  A0  read memory word at the read pointer, advance at S2;
//           Q = 1 while unread words remain (Q-stop readout)
//   F0  A1  read the write pointer (words stored)
//   F0  A2  read status: [23] overflow, [22] LAM, [21] busy, [19:0] events
//   F1  An  read register n         F16 An  write register n
//   F8  A0  test LAM (Q = LAM)       F9  A0  clear memory pointers
//   F10 A0  clear LAM and re-arm     F17 A0  load the read pointer
//   F25 A0  software trigger
// Registers: A0 control ([1:0] mode, [2] SAS_RES), A1 total samples,
// A2 sample period (clocks), A3 threshold, A4 delay, A5 start (a write also
// releases a CRDC2 event waiting for it), A6 width, A7 PPAC lookback.
// Z.S2 loads the defaults, C.S2 clears the pointers and the LAM, I inhibits
// triggers. The defaults are the operating point of the CRDC example run:
// 510 samples of 25 ns, gate start 135, 12 cells. The function codes and the
// register map are choices of this design.
module camac_slave
  import ulm_pkg::*;
#(
  parameter int unsigned MEM_AW = 20,
  parameter logic [9:0]  DEF_SAMPLES = 10'd510,
  parameter logic [7:0]  DEF_DIV     = 8'd2,
  parameter logic [8:0]  DEF_START   = 9'd135,
  parameter logic [9:0]  DEF_WIDTH   = 10'd12
) (
  input  logic              clk,
  input  logic              rst_n,
  // dataway
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
  // to the controller
  output cfg_t              cfg,
  output logic              start_wr,
  output logic              rearm,
  output logic              sw_trigger,
  output logic              mem_clear,
  output logic              inhibit,
  input  logic              busy,
  input  logic [MEM_AW:0]   wr_ptr,
  input  logic [19:0]       event_count,
  input  logic              overflow,
  input  logic              event_done,
  // memory read port
  output logic              rd_req,
  output logic [MEM_AW-1:0] rd_addr,
  input  logic              rd_ack,
  input  logic              rd_valid,
  input  logic [MEM_DW-1:0] rd_data
);

  localparam cfg_t CFG_DEFAULT = '{
    mode: MODE_OFF, sas_res: 1'b0, n_samples: DEF_SAMPLES, sample_div: DEF_DIV,
    threshold: 8'd0, delay: 4'd0, start: DEF_START, width: DEF_WIDTH,
    lookback: 9'd0
  };

  logic [2:0] s1_sy, s2_sy;
  logic [1:0] z_sy, c_sy, i_sy;
  logic       s1_rise, s2_rise;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_sy <= '0; s2_sy <= '0; z_sy <= '0; c_sy <= '0; i_sy <= '0;
    end else begin
      s1_sy <= {s1_sy[1:0], cam_s1};
      s2_sy <= {s2_sy[1:0], cam_s2};
      z_sy  <= {z_sy[0], cam_z};
      c_sy  <= {c_sy[0], cam_c};
      i_sy  <= {i_sy[0], cam_i};
    end
  end

  assign s1_rise = s1_sy[1] && !s1_sy[2];
  assign s2_rise = s2_sy[1] && !s2_sy[2];
  assign inhibit = i_sy[1];

  logic              lam;
  logic [MEM_AW:0]   rd_ptr;
  logic              pf_valid, pf_pending;
  logic [MEM_DW-1:0] pf_data;
  logic              data_avail;

  assign data_avail = rd_ptr < wr_ptr;

  logic n_cmd;  // command addressed to this station, sampled at a strobe edge
  assign n_cmd = cam_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg        <= CFG_DEFAULT;
      start_wr   <= 1'b0;
      rearm      <= 1'b0;
      sw_trigger <= 1'b0;
      mem_clear  <= 1'b0;
      lam        <= 1'b0;
      rd_ptr     <= '0;
      pf_valid   <= 1'b0;
      pf_pending <= 1'b0;
      pf_data    <= '0;
    end else begin
      start_wr   <= 1'b0;
      rearm      <= 1'b0;
      sw_trigger <= 1'b0;
      mem_clear  <= 1'b0;
      if (event_done) lam <= 1'b1;

      // prefetch of the word at the read pointer
      if (rd_ack) pf_pending <= 1'b1;
      if (rd_valid && pf_pending) begin
        pf_data    <= rd_data;
        pf_valid   <= 1'b1;
        pf_pending <= 1'b0;
      end

      if (s1_rise && n_cmd && cam_f == 5'd16) begin
        unique case (cam_a)
          4'd0: begin cfg.mode <= mode_e'(cam_w[1:0]); cfg.sas_res <= cam_w[2]; end
          4'd1: cfg.n_samples  <= cam_w[9:0];
          4'd2: cfg.sample_div <= cam_w[7:0];
          4'd3: cfg.threshold  <= cam_w[7:0];
          4'd4: cfg.delay      <= cam_w[3:0];
          4'd5: begin cfg.start <= cam_w[8:0]; start_wr <= 1'b1; end
          4'd6: cfg.width      <= cam_w[9:0];
          4'd7: cfg.lookback   <= cam_w[8:0];
          default: ;
        endcase
      end
      if (s1_rise && n_cmd && cam_f == 5'd17 && cam_a == 4'd0) begin
        rd_ptr     <= cam_w[MEM_AW:0];
        pf_valid   <= 1'b0;
        pf_pending <= 1'b0;
      end

      if (s2_rise && n_cmd) begin
        unique case (cam_f)
          5'd0: if (cam_a == 4'd0 && data_avail) begin
            rd_ptr     <= rd_ptr + 1'b1;
            pf_valid   <= 1'b0;
            pf_pending <= 1'b0;
          end
          5'd9: if (cam_a == 4'd0) begin
            mem_clear  <= 1'b1;
            rd_ptr     <= '0;
            pf_valid   <= 1'b0;
            pf_pending <= 1'b0;
          end
          5'd10: if (cam_a == 4'd0) begin
            lam   <= 1'b0;
            rearm <= 1'b1;
          end
          5'd25: if (cam_a == 4'd0) sw_trigger <= 1'b1;
          default: ;
        endcase
      end

      if (s2_rise && c_sy[1]) begin
        mem_clear  <= 1'b1;
        rd_ptr     <= '0;
        pf_valid   <= 1'b0;
        pf_pending <= 1'b0;
        lam        <= 1'b0;
        rearm      <= 1'b1;
      end
      if (s2_rise && z_sy[1]) begin
        cfg        <= CFG_DEFAULT;
        mem_clear  <= 1'b1;
        rd_ptr     <= '0;
        pf_valid   <= 1'b0;
        pf_pending <= 1'b0;
        lam        <= 1'b0;
        rearm      <= 1'b1;
      end
    end
  end

  assign rd_req  = !pf_valid && !pf_pending && data_avail;
  assign rd_addr = rd_ptr[MEM_AW-1:0];
  assign cam_l   = lam;

  // Dataway responses
  always_comb begin
    cam_r = '0;
    cam_q = 1'b0;
    cam_x = 1'b0;
    if (cam_n) begin
      unique case (cam_f)
        5'd0: begin
          cam_x = cam_a <= 4'd2;
          cam_q = cam_x;
          unique case (cam_a)
            4'd0: begin cam_r = pf_data; cam_q = data_avail && pf_valid; end
            4'd1: cam_r = 24'(wr_ptr);
            4'd2: cam_r = {overflow, lam, busy, 1'b0, event_count};
            default: ;
          endcase
        end
        5'd1: begin
          cam_x = cam_a <= 4'd7;
          cam_q = cam_x;
          unique case (cam_a)
            4'd0: cam_r = {21'd0, cfg.sas_res, cfg.mode};
            4'd1: cam_r = 24'(cfg.n_samples);
            4'd2: cam_r = 24'(cfg.sample_div);
            4'd3: cam_r = 24'(cfg.threshold);
            4'd4: cam_r = 24'(cfg.delay);
            4'd5: cam_r = 24'(cfg.start);
            4'd6: cam_r = 24'(cfg.width);
            4'd7: cam_r = 24'(cfg.lookback);
            default: ;
          endcase
        end
        5'd16: begin cam_x = cam_a <= 4'd7; cam_q = cam_x; end
        5'd8:  begin cam_x = cam_a == 4'd0; cam_q = cam_x && lam; end
        5'd9, 5'd10, 5'd17, 5'd25: begin cam_x = cam_a == 4'd0; cam_q = cam_x; end
        default: ;
      endcase
    end
  end

endmodule
