// adc_readout: reads one SCA cell of every FEE board through the ramp ADCs.
//
// Started by `go' while the wanted cell is connected to the SCA output
// amplifiers, it runs the fixed sequence
//   AN_RES pulse  -> settle -> conversion (ADC_RES released, ADC_CLK running)
//   -> ADC_LD pulse -> 64 multiplexer steps -> gap -> `done'
// Each multiplexer step lasts STEP_CYCLES clocks (100 ns at the 80 MHz clock
// assumed here) and selects card (CARD_ENA), chip (ADC_OE) and channel
// (ADC_ADR, active low); the four FEE pairs put one byte each on the 32-bit
// bus, so 64 steps read 256 channels and take 6.4 us. That step time, the
// parallel 4 x 8-bit bus and the signal polarities of ADC_RES and ADC_ADR
// follow the system description. The AN_RES, settle and conversion lengths,
// the card -> chip -> address order and the active-high CARD_ENA/ADC_OE are
// choices of this design.
//
// Token stream: a TK_CELL token in the first AN_RES cycle, then a TK_CAPTURE
// token in the last cycle of every multiplexer step, carrying {card,chip,addr}.
// Tokens are at least STEP_CYCLES apart. Outputs are combinational decodes of
// registered state; the top registers them once more before the pins.
module adc_readout
  import ulm_pkg::*;
#(
  parameter int unsigned STEP_CYCLES  = 8,
  parameter int unsigned CONV_CYCLES  = 32,
  parameter int unsigned ANRES_CYCLES = 4,
  parameter int unsigned SETTLE_CYCLES = 4,
  parameter int unsigned LD_CYCLES    = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              go,
  input  logic [CELL_W-1:0] cell_no,
  output logic              busy,
  output logic              done,
  output logic              an_res,
  output logic              adc_clk,
  output logic              adc_res_n,
  output logic              adc_ld,
  output logic [3:0]        adc_adr_n,
  output logic [1:0]        adc_oe,
  output logic [1:0]        card_ena,
  output token_t            tok
);

  typedef enum logic [2:0] {
    S_IDLE, S_ANRES, S_SETTLE, S_CONV, S_LOAD, S_MUX, S_GAP
  } state_e;

  localparam int unsigned CW = 10;

  state_e            state;
  logic [CW-1:0]     cnt;      // cycles left in the current phase / step
  logic [5:0]        step;     // {card, chip, address}
  logic [CELL_W-1:0] cell_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      cnt    <= '0;
      step   <= '0;
      cell_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (go) begin
          state  <= S_ANRES;
          cnt    <= CW'(ANRES_CYCLES - 1);
          cell_q <= cell_no;
        end
        S_ANRES: if (cnt == 0) begin
          state <= S_SETTLE;
          cnt   <= CW'(SETTLE_CYCLES - 1);
        end else cnt <= cnt - 1'b1;
        S_SETTLE: if (cnt == 0) begin
          state <= S_CONV;
          cnt   <= CW'(CONV_CYCLES - 1);
        end else cnt <= cnt - 1'b1;
        S_CONV: if (cnt == 0) begin
          state <= S_LOAD;
          cnt   <= CW'(LD_CYCLES - 1);
        end else cnt <= cnt - 1'b1;
        S_LOAD: if (cnt == 0) begin
          state <= S_MUX;
          cnt   <= CW'(STEP_CYCLES - 1);
          step  <= '0;
        end else cnt <= cnt - 1'b1;
        S_MUX: if (cnt == 0) begin
          cnt <= CW'(STEP_CYCLES - 1);
          if (step == 6'(STEPS - 1)) state <= S_GAP;
          else                       step  <= step + 1'b1;
        end else cnt <= cnt - 1'b1;
        S_GAP: if (cnt == 0) state <= S_IDLE;
               else          cnt   <= cnt - 1'b1;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy      = (state != S_IDLE);
    done      = (state == S_GAP) && (cnt == 0);
    an_res    = (state == S_ANRES);
    adc_res_n = (state == S_CONV) || (state == S_LOAD);
    adc_clk   = (state == S_CONV) && cnt[0];
    adc_ld    = (state == S_LOAD);
    adc_adr_n = (state == S_MUX) ? ~step[3:0] : 4'hF;
    adc_oe    = (state == S_MUX) ? (step[4] ? 2'b10 : 2'b01) : 2'b00;
    card_ena  = (state == S_MUX) ? (step[5] ? 2'b10 : 2'b01) : 2'b00;
    tok       = TOK_NONE;
    if (state == S_ANRES && cnt == CW'(ANRES_CYCLES - 1)) begin
      tok.valid = 1'b1;
      tok.kind  = TK_CELL;
      tok.cell_no  = cell_q;
    end else if (state == S_MUX && cnt == 0) begin
      tok.valid = 1'b1;
      tok.kind  = TK_CAPTURE;
      tok.cell_no  = cell_q;
      tok.step  = step;
    end
  end

  // A new cell may only be requested while idle.
  a_go_idle: assert property (@(posedge clk) disable iff (!rst_n) go |-> state == S_IDLE);

endmodule
