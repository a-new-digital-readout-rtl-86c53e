// ulm_pkg: types and constants shared by the FEE readout controller.
//
// The controller runs in the FPGA of a CAMAC logic module and reads STAR-style
// front-end boards (FEE): 8 boards of 32 channels, grouped in 4 pairs. Each pair
// drives one byte of the 32-bit input data word, so one multiplexer step reads
// 4 channels in parallel and 64 steps read all 256 channels of one SCA cell.
// The 16 FEE control lines, the 4 x 8-bit data bus, the 64-step sequence and the
// 100 ns step come from the system description; the clock rate (80 MHz), the
// token and item formats, the register map and the memory word format are
// choices of this design.
package ulm_pkg;

  // ---- FEE geometry -------------------------------------------------------
  localparam int unsigned N_PAIRS      = 4;   // FEE pairs = bytes of the data bus
  localparam int unsigned CHIP_CH      = 16;  // channels per SCA/ADC chip
  localparam int unsigned STEPS        = 64;  // 2 cards x 2 chips x 16 addresses
  localparam int unsigned ADC_BITS     = 8;
  localparam int unsigned CELL_W       = 9;   // SCA cell index width (512 cells)
  localparam int unsigned CH_W         = 8;   // {pair, card, chip, address}

  // ---- memory ------------------------------------------------------------
  localparam int unsigned MEM_DW       = 24;  // CAMAC word width

  // ---- run modes -----------------------------------------------------------
  typedef enum logic [1:0] {
    MODE_CRDC  = 2'd0,  // triggered sampling, fixed start cell
    MODE_CRDC2 = 2'd1,  // triggered sampling, start cell written after the TDC
    MODE_PPAC  = 2'd2,  // continuous sampling, look back from the trigger
    MODE_OFF   = 2'd3   // disabled
  } mode_e;

  // Run parameters, written through CAMAC.
  typedef struct packed {
    mode_e             mode;
    logic              sas_res;     // preamplifier-shaper reset
    logic [9:0]        n_samples;   // cells written per CRDC event
    logic [7:0]        sample_div;  // sample period in clocks (>= 2)
    logic [7:0]        threshold;
    logic [3:0]        delay;       // data return delay in clocks
    logic [CELL_W-1:0] start;       // first cell read (CRDC modes)
    logic [9:0]        width;       // cells read per event
    logic [CELL_W-1:0] lookback;    // PPAC: cells back from the trigger
  } cfg_t;

  // The 16 FEE control lines at their electrical levels.
  typedef struct packed {
    logic       rw_mux;    // 0 write, 1 read
    logic       sca_clk;   // falling edge scrolls, rising edge connects
    logic       sr_res;    // reset shift register to the first cell
    logic       an_res;    // reset SCA output amplifier, active high
    logic       adc_clk;   // ADC counter clock
    logic       adc_res_n; // ADC counter/ramp reset, active low
    logic       adc_ld;    // load ADC buffers, active high
    logic [3:0] adc_adr_n; // multiplexer address, active low
    logic [1:0] adc_oe;    // output enable of chip 1 / chip 2
    logic [1:0] card_ena;  // card enable of card 1 / card 2 of a pair
    logic       sas_res;   // preamplifier-shaper reset, active high
  } fee_ctrl_t;

  // Tokens from the sequencers to the data path. A capture token marks the
  // moment the data of multiplexer step `step' is on the bus (before the
  // return-delay correction).
  typedef enum logic [1:0] {
    TK_EVENT_START = 2'd0,
    TK_CELL        = 2'd1,
    TK_CAPTURE     = 2'd2,
    TK_EVENT_END   = 2'd3
  } tok_kind_e;

  typedef struct packed {
    logic              valid;
    tok_kind_e         kind;
    logic [CELL_W-1:0] cell_no;
    logic [5:0]        step;   // {card, chip, address}
  } token_t;

  // Items from zero suppression to the event builder.
  typedef enum logic [1:0] {
    IT_HEADER  = 2'd0,
    IT_CELL    = 2'd1,
    IT_HIT     = 2'd2,
    IT_TRAILER = 2'd3
  } item_kind_e;

  typedef struct packed {
    logic              valid;
    item_kind_e        kind;
    logic [CELL_W-1:0] cell_no;
    logic [CH_W-1:0]   channel;
    logic [7:0]        value;   // data minus threshold
  } item_t;

  // Memory word format (24 bits).
  //   header  : 1 000 event[19:0]
  //   cell    : 1 001 00000000000 cell[8:0]
  //   hit     : 0 0000000 channel[7:0] value[7:0]
  //   trailer : 1 010 hits[19:0]
  localparam logic [2:0] W_HEADER  = 3'b000;
  localparam logic [2:0] W_CELL    = 3'b001;
  localparam logic [2:0] W_TRAILER = 3'b010;

  function automatic logic [MEM_DW-1:0] hit_word(logic [CH_W-1:0] ch, logic [7:0] v);
    return {1'b0, 7'd0, ch, v};
  endfunction

  function automatic logic [MEM_DW-1:0] cell_word(logic [CELL_W-1:0] c);
    return {1'b1, W_CELL, 11'd0, c};
  endfunction

  function automatic logic [MEM_DW-1:0] header_word(logic [19:0] ev);
    return {1'b1, W_HEADER, ev};
  endfunction

  function automatic logic [MEM_DW-1:0] trailer_word(logic [19:0] n);
    return {1'b1, W_TRAILER, n};
  endfunction

  localparam token_t TOK_NONE  = '0;
  localparam item_t  ITEM_NONE = '0;

endpackage
