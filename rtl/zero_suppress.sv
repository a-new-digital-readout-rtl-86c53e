// zero_suppress: threshold comparison of the FEE data.
//
// On a (delayed) capture token the 32-bit data bus is latched: byte p is the
// ADC value of FEE pair p for multiplexer step {card,chip,addr}. Over the next
// N_PAIRS clocks the bytes are examined one per clock; each byte strictly above
// `threshold' becomes a hit item carrying channel {p,card,chip,addr} and the
// value with the threshold subtracted, and bytes at or below it are dropped.
// Other tokens (event start, cell, event end) become header, cell and trailer
// items and pass in order, in the clock after they arrive. Comparing to a
// programmable threshold, keeping only what is above it and subtracting it
// follow the system description; one shared threshold, "strictly above" and
// the scan order are choices of this design.
//
// Timing: a capture keeps the block busy N_PAIRS clocks; the sequencers space
// tokens at least STEP_CYCLES (8) clocks apart after a capture, which an
// assertion checks.
module zero_suppress
  import ulm_pkg::*;
#(
  parameter int unsigned N_PAIRS_P = N_PAIRS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  token_t                 tok,
  input  logic [8*N_PAIRS_P-1:0] data,
  input  logic [7:0]             threshold,
  output item_t                  item,
  output logic [31:0]            n_dropped   // bytes at or below threshold
);

  localparam int unsigned PW = (N_PAIRS_P > 1) ? $clog2(N_PAIRS_P) : 1;

  logic [8*N_PAIRS_P-1:0] word_q;
  logic [5:0]             step_q;
  logic [CELL_W-1:0]      cell_q;
  logic                   scanning;
  logic [PW-1:0]          pair;
  logic [7:0]             byte_v;

  assign byte_v = word_q[8*pair +: 8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_q    <= '0;
      step_q    <= '0;
      cell_q    <= '0;
      scanning  <= 1'b0;
      pair      <= '0;
      item      <= ITEM_NONE;
      n_dropped <= '0;
    end else begin
      item <= ITEM_NONE;
      if (scanning) begin
        if (byte_v > threshold) begin
          item.valid   <= 1'b1;
          item.kind    <= IT_HIT;
          item.cell_no    <= cell_q;
          item.channel <= CH_W'({pair, step_q});
          item.value   <= byte_v - threshold;
        end else begin
          n_dropped <= n_dropped + 1'b1;
        end
        if (pair == PW'(N_PAIRS_P - 1)) scanning <= 1'b0;
        else                            pair     <= pair + 1'b1;
      end
      if (tok.valid) begin
        unique case (tok.kind)
          TK_CAPTURE: begin
            word_q   <= data;
            step_q   <= tok.step;
            cell_q   <= tok.cell_no;
            scanning <= 1'b1;
            pair     <= '0;
          end
          TK_EVENT_START: begin
            item.valid <= 1'b1;
            item.kind  <= IT_HEADER;
            item.cell_no  <= tok.cell_no;
          end
          TK_CELL: begin
            item.valid <= 1'b1;
            item.kind  <= IT_CELL;
            item.cell_no  <= tok.cell_no;
          end
          TK_EVENT_END: begin
            item.valid <= 1'b1;
            item.kind  <= IT_TRAILER;
            item.cell_no  <= tok.cell_no;
          end
          default: ;
        endcase
      end
    end
  end

  // No token may arrive while the previous capture is still being scanned.
  a_spacing: assert property (@(posedge clk) disable iff (!rst_n)
                              tok.valid |-> !scanning);

endmodule
