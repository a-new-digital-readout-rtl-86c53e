// fee_model: behavioural model of the 8 front-end boards behind the interface
// board (4 pairs x 2 cards x 2 SCA/ADC chips x 16 channels), for simulation.
//
// SCA: 512 cells per channel. After SR_RES cell 0 is connected; a falling
// edge of SCA_CLK in write mode (RW_MUX low) stores the input in the connected
// cell and connects the next one; an SR_RES pulse in write mode stores the
// connected cell and connects cell 0. In read mode the same edges only move.
// The output amplifier gives the connected cell only after an AN_RES pulse.
// ADC: a conversion started by releasing ADC_RES and ended by ADC_LD gives the
// sample if it lasted at least CONV_MIN clocks, 0 otherwise. Multiplexer: the
// selected card / chip / channel (ADC_ADR active low) drives the pair's byte.
// The data bus is returned CABLE clocks after the control lines change.
// The analog input of channel ch at time t (clocks since t_ref) is
//   base(ch) + a triangular pulse of height amp(ch), centred on pk(ch),
// with the formulas in sig(); the test benches repeat them independently.
// stored[c][ch] and stime[c] record what each cell holds and when it was
// written, so a bench can tell which samples it must find in memory.
module fee_model
  import ulm_pkg::*;
#(
  parameter int CABLE    = 6,
  parameter int CONV_MIN = 24
) (
  input  logic        clk,
  input  fee_ctrl_t   ctrl,
  input  longint      t_ref,
  output logic [31:0] data
);

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

  logic [7:0]  stored [512][256];
  longint      stime  [512];
  logic [7:0]  adc    [256];
  int          ptr;
  logic        an_ok;
  longint      now;
  longint      conv_start;
  int          n_stores;       // cells written since the last read phase
  int          last_store;     // last cell written
  int          n_short_conv;   // conversions shorter than CONV_MIN
  fee_ctrl_t   prev;
  logic [31:0] pipe [CABLE+1];
  logic [31:0] bus;

  initial begin
    for (int c = 0; c < 512; c++) begin
      stime[c] = -1;
      for (int ch = 0; ch < 256; ch++) stored[c][ch] = 8'd0;
    end
    for (int ch = 0; ch < 256; ch++) adc[ch] = 8'd0;
    ptr = 0; an_ok = 0; now = 0; conv_start = 0; n_stores = 0; last_store = -1;
    n_short_conv = 0;
    prev = '{sca_clk: 1'b1, adc_adr_n: 4'hF, default: '0};
    for (int i = 0; i <= CABLE; i++) pipe[i] = '0;
  end

  task automatic store_cell();
    for (int ch = 0; ch < 256; ch++) stored[ptr][ch] = 8'(sig(ch, now - t_ref));
    stime[ptr] = now;
    last_store = ptr;
    n_stores++;
  endtask

  always @(posedge clk) begin
    now <= now + 1;
    if (!prev.rw_mux && ctrl.rw_mux) n_stores = 0;
    if (prev.sca_clk && !ctrl.sca_clk) begin
      if (!ctrl.rw_mux) store_cell();
      ptr = (ptr + 1) % 512;
      an_ok = 0;
    end
    if (!prev.sr_res && ctrl.sr_res) begin
      if (!ctrl.rw_mux && !prev.rw_mux) store_cell();
      ptr = 0;
      an_ok = 0;
    end
    if (prev.an_res && !ctrl.an_res) an_ok = 1;
    if (!prev.adc_res_n && ctrl.adc_res_n) conv_start = now;
    if (!prev.adc_ld && ctrl.adc_ld) begin
      if (now - conv_start < CONV_MIN) n_short_conv++;
      for (int ch = 0; ch < 256; ch++)
        adc[ch] = (ctrl.rw_mux && an_ok && now - conv_start >= CONV_MIN) ? stored[ptr][ch] : 8'd0;
    end
    prev = ctrl;
  end

  // multiplexer and cable
  always_comb begin
    bus = '0;
    if ($onehot(ctrl.card_ena) && $onehot(ctrl.adc_oe))
      for (int p = 0; p < 4; p++)
        bus[8*p +: 8] = adc[{p[1:0], ctrl.card_ena[1], ctrl.adc_oe[1], ~ctrl.adc_adr_n}];
  end

  always @(posedge clk) begin
    pipe[0] <= bus;
    for (int i = 1; i <= CABLE; i++) pipe[i] <= pipe[i-1];
  end
  assign data = pipe[CABLE-1];

endmodule
