// fee_sequencer: run control of the switched capacitor arrays (SCA).
//
// Two ways of filling the SCA, as the system description defines them:
//  * CRDC modes: a valid trigger starts the sampling. The shift register is
//    reset to cell 0 (SR_RES) and n_samples cells are written, one per sample
//    period (sample_div clocks, 2 clocks = 25 ns at 80 MHz). The first cell to
//    read is cfg.start (mode CRDC) or the start value the readout program writes
//    once the multihit TDC has measured the drift time (mode CRDC2: the
//    sequencer waits for that write, `start_wr', seen any time after the trigger).
//  * PPAC mode: the SCA samples without pause as a circular analog buffer; on a
//    trigger the sampling stops at the end of the current sample and the first
//    cell read is `lookback' cells before the last cell written.
// Then the array is put in read mode (RW_MUX high), reset to cell 0, scrolled
// to the first cell (one SCA_CLK pulse per SCROLL_PERIOD clocks) and `width'
// consecutive cells are read, each through adc_readout. Moving on from the last
// cell wraps to cell 0 with an SR_RES pulse in place of a scroll.
//
// SCA model assumed: after SR_RES cell 0 is connected; each falling edge of
// SCA_CLK (and, at the wrap, the SR_RES pulse) disconnects the connected cell,
// which then holds its sample, and connects the next one. SCA_CLK idles high.
//
// Tokens: TK_EVENT_START as the read phase begins, TK_EVENT_END after the last
// cell. After an event the sequencer stays busy until `rearm' (LAM cleared).
module fee_sequencer
  import ulm_pkg::*;
#(
  parameter int unsigned SCA_CELLS     = 512,
  parameter int unsigned SCROLL_PERIOD = 4,
  parameter int unsigned RES_CYCLES    = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cfg_t              cfg,
  input  logic              trigger,     // one-cycle pulse
  input  logic              start_wr,    // one-cycle pulse: start register written
  input  logic              rearm,       // one-cycle pulse: LAM cleared
  // ADC readout sequencer
  output logic              adc_go,
  output logic [CELL_W-1:0] adc_cell,
  input  logic              adc_done,
  // SCA control lines
  output logic              rw_mux,
  output logic              sca_clk,
  output logic              sr_res,
  output logic              busy,        // not ready for a trigger
  output logic              sampling,    // SCA in write mode and running
  output token_t            tok
);

  typedef enum logic [3:0] {
    S_IDLE, S_WR_RES, S_WRITE, S_WAIT_START, S_RD_MODE, S_RD_RES,
    S_SCROLL, S_READ, S_READ_WAIT, S_ADVANCE, S_END, S_WAIT_ACK
  } state_e;

  state_e            state;
  mode_e             mode_q;
  logic [7:0]        tcnt;        // clocks into the current pulse slot
  logic [7:0]        period;      // current slot length
  logic [CELL_W-1:0] cur;         // connected cell
  logic [CELL_W-1:0] first;       // first cell to read
  logic [9:0]        nleft;       // samples / cells left
  logic              wrap;        // current slot is an SR_RES wrap
  logic              stop_req;    // PPAC trigger seen
  logic              start_seen;  // CRDC2 start written since the trigger

  localparam logic [CELL_W-1:0] LAST = CELL_W'(SCA_CELLS - 1);

  logic [7:0] sdiv;
  assign sdiv = (cfg.sample_div < 8'd2) ? 8'd2 : cfg.sample_div;

  // Pulse slot: first half low (SCA_CLK) or SR_RES high, second half idle.
  logic slot_first_half, slot_end;
  assign slot_first_half = tcnt < (period >> 1);
  assign slot_end        = tcnt == period - 1'b1;

  function automatic logic [CELL_W-1:0] next_cell(logic [CELL_W-1:0] c);
    return (c == LAST) ? '0 : c + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      mode_q     <= MODE_OFF;
      tcnt       <= '0;
      period     <= 8'd2;
      cur        <= '0;
      first      <= '0;
      nleft      <= '0;
      wrap       <= 1'b0;
      stop_req   <= 1'b0;
      start_seen <= 1'b0;
    end else begin
      if (start_wr) start_seen <= 1'b1;
      unique case (state)
        S_IDLE: begin
          tcnt       <= '0;
          stop_req   <= 1'b0;
          if (cfg.mode == MODE_PPAC) begin
            mode_q <= MODE_PPAC;
            state  <= S_WR_RES;
          end else if ((cfg.mode == MODE_CRDC || cfg.mode == MODE_CRDC2) && trigger) begin
            mode_q     <= cfg.mode;
            start_seen <= start_wr;
            state      <= S_WR_RES;
          end
        end
        S_WR_RES: begin
          cur    <= '0;
          nleft  <= cfg.n_samples;
          period <= sdiv;
          wrap   <= 1'b0;
          if (tcnt == 8'(RES_CYCLES - 1)) begin
            tcnt  <= '0;
            state <= (mode_q != MODE_PPAC && cfg.n_samples == 0) ? S_WAIT_START : S_WRITE;
          end else tcnt <= tcnt + 1'b1;
        end
        S_WRITE: begin
          if (mode_q == MODE_PPAC && trigger) stop_req <= 1'b1;
          if (tcnt == 0) wrap <= (mode_q == MODE_PPAC) && (cur == LAST);
          if (slot_end) begin
            tcnt <= '0;
            cur  <= next_cell(cur);
            if (mode_q == MODE_PPAC) begin
              if (trigger || stop_req || cfg.mode != MODE_PPAC) begin
                // last cell written is `cur'
                first <= (cur >= cfg.lookback)
                         ? cur - cfg.lookback
                         : CELL_W'(10'(SCA_CELLS) + {1'b0, cur} - {1'b0, cfg.lookback});
                state <= (cfg.mode != MODE_PPAC) ? S_IDLE : S_RD_MODE;
              end
            end else begin
              nleft <= nleft - 1'b1;
              if (nleft == 10'd1) state <= S_WAIT_START;
            end
          end else tcnt <= tcnt + 1'b1;
        end
        S_WAIT_START: begin
          if (mode_q == MODE_CRDC) begin
            first <= cfg.start;
            state <= S_RD_MODE;
          end else if (start_seen || start_wr) begin
            first <= cfg.start;
            state <= S_RD_MODE;
          end
        end
        S_RD_MODE: begin   // event start token, switch RW_MUX
          tcnt  <= '0;
          nleft <= cfg.width;
          state <= S_RD_RES;
        end
        S_RD_RES: begin
          cur <= '0;
          if (tcnt == 8'(RES_CYCLES - 1)) begin
            tcnt   <= '0;
            period <= 8'(SCROLL_PERIOD);
            wrap   <= 1'b0;
            state  <= S_SCROLL;
          end else tcnt <= tcnt + 1'b1;
        end
        S_SCROLL: begin
          if (cur == first) begin
            tcnt  <= '0;
            state <= (nleft == 0) ? S_END : S_READ;
          end else if (slot_end) begin
            tcnt <= '0;
            cur  <= cur + 1'b1;
          end else tcnt <= tcnt + 1'b1;
        end
        S_READ: state <= S_READ_WAIT;
        S_READ_WAIT: if (adc_done) begin
          nleft <= nleft - 1'b1;
          tcnt  <= '0;
          wrap  <= (cur == LAST);
          state <= (nleft == 10'd1) ? S_END : S_ADVANCE;
        end
        S_ADVANCE: if (slot_end) begin
          tcnt  <= '0;
          cur   <= next_cell(cur);
          state <= S_READ;
        end else tcnt <= tcnt + 1'b1;
        S_END: state <= S_WAIT_ACK;
        S_WAIT_ACK: if (rearm) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    rw_mux   = !(state inside {S_IDLE, S_WR_RES, S_WRITE, S_WAIT_START});
    sca_clk  = 1'b1;
    sr_res   = 1'b0;
    if (state == S_WR_RES || state == S_RD_RES) sr_res = 1'b1;
    if ((state == S_WRITE || state == S_ADVANCE) && slot_first_half) begin
      if (wrap) sr_res  = 1'b1;
      else      sca_clk = 1'b0;
    end
    if (state == S_SCROLL && cur != first && slot_first_half) sca_clk = 1'b0;
    // S_WRITE: wrap is registered in the slot's first cycle; take it live then
    if (state == S_WRITE && tcnt == 0) begin
      if (mode_q == MODE_PPAC && cur == LAST) begin
        sr_res  = 1'b1;
        sca_clk = 1'b1;
      end else begin
        sr_res  = 1'b0;
        sca_clk = 1'b0;
      end
    end
    adc_go   = (state == S_READ);
    adc_cell = cur;
    sampling = (state == S_WRITE);
    busy     = !(state == S_IDLE || (state == S_WRITE && mode_q == MODE_PPAC));
    tok      = TOK_NONE;
    if (state == S_RD_MODE) begin
      tok.valid = 1'b1;
      tok.kind  = TK_EVENT_START;
      tok.cell_no  = first;
    end else if (state == S_END) begin
      tok.valid = 1'b1;
      tok.kind  = TK_EVENT_END;
      tok.cell_no  = cur;
    end
  end

endmodule
