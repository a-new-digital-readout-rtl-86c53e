// event_builder: writes the suppressed data stream into the static memory.
//
// Each item becomes one 24-bit word (format in ulm_pkg):
//   header  -> event number (counts from 0 after a pointer clear)
//   cell    -> SCA cell number that the following hits were read from
//   hit     -> channel and threshold-subtracted value
//   trailer -> number of hits in the event; `event_done' pulses with its write
// Words go to consecutive addresses starting at 0; `clear' (CAMAC) resets the
// write pointer and the event number. Once MEM_DEPTH words are written further
// words are dropped and the sticky `overflow' flag is set until the next clear.
// Storing the readout in the module's static memory for CAMAC readout follows
// the system description; the word format, the 24-bit width and the overflow
// rule are choices of this design. One word is written per item, in the clock
// after the item arrives, so the builder never stalls.
module event_builder
  import ulm_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 1048576,
  localparam int unsigned AW = $clog2(MEM_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  item_t             item,
  output logic              wr_en,
  output logic [AW-1:0]     wr_addr,
  output logic [MEM_DW-1:0] wr_data,
  output logic [AW:0]       wr_ptr,      // words written
  output logic [19:0]       event_count,
  output logic              overflow,
  output logic              event_done
);

  logic [19:0] hits;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_en       <= 1'b0;
      wr_addr     <= '0;
      wr_data     <= '0;
      wr_ptr      <= '0;
      event_count <= '0;
      overflow    <= 1'b0;
      event_done  <= 1'b0;
      hits        <= '0;
    end else begin
      wr_en      <= 1'b0;
      event_done <= 1'b0;
      if (clear) begin
        wr_ptr      <= '0;
        event_count <= '0;
        overflow    <= 1'b0;
      end else if (item.valid) begin
        if (wr_ptr < (AW+1)'(MEM_DEPTH)) begin
          wr_en   <= 1'b1;
          wr_addr <= wr_ptr[AW-1:0];
          wr_ptr  <= wr_ptr + 1'b1;
        end else begin
          overflow <= 1'b1;
        end
        unique case (item.kind)
          IT_HEADER: begin
            wr_data     <= header_word(event_count);
            event_count <= event_count + 1'b1;
            hits        <= '0;
          end
          IT_CELL:    wr_data <= cell_word(item.cell_no);
          IT_HIT: begin
            wr_data <= hit_word(item.channel, item.value);
            hits    <= hits + 1'b1;
          end
          IT_TRAILER: begin
            wr_data    <= trailer_word(hits);
            event_done <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

endmodule
