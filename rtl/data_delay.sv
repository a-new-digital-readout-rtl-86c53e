// data_delay: return-delay compensation for the FEE data bus.
//
// The control lines leave the FPGA, cross cables and the interface board, and
// the FEE answers after a delay that depends on the installation; the run
// parameters therefore hold a `delay' value to be matched to it. This block
// delays the token stream by exactly `delay' clocks (0..MAX_DELAY), so a
// capture token meets the data of its own multiplexer step at the input
// register. The delay line is a shift register of tokens with a selectable
// tap; `delay' = 0 passes the token straight through (combinational). The
// range and the clock-cycle unit are choices of this design.
module data_delay
  import ulm_pkg::*;
#(
  parameter int unsigned MAX_DELAY = 15
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [$clog2(MAX_DELAY+1)-1:0] delay,
  input  token_t                         in_tok,
  output token_t                         out_tok
);

  token_t line [1:MAX_DELAY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= MAX_DELAY; i++) line[i] <= TOK_NONE;
    end else begin
      line[1] <= in_tok;
      for (int i = 2; i <= MAX_DELAY; i++) line[i] <= line[i-1];
    end
  end

  always_comb begin
    out_tok = in_tok;
    for (int i = 1; i <= MAX_DELAY; i++)
      if (int'(delay) == i) out_tok = line[i];
  end

endmodule
