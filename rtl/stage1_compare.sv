// Stage 1 of the query pipeline: selection, comparison half.
//
// The Symbol attribute of the incoming word is compared with the constant of
// the query's WHERE clause (SYMBOL_KEY, "UBSN" by default). The one-bit
// result is appended to the bus as is_equal, and the whole bus is registered.
// The punctuation flag, data valid and all data fields pass through
// unchanged, so punctuations reach the windowing stage. One cycle of latency,
// one word per cycle. Structure per the document; the reset (synchronous,
// active high, clears both flags) is this design's choice.
module stage1_compare
  import swa_pkg::*;
#(
  parameter logic [WORD_W-1:0] SYMBOL_KEY = SYMBOL_UBSN
) (
  input  logic       clk,
  input  logic       rst,
  input  trade_bus_t in_bus,
  output sel_bus_t   out_bus
);

  always_ff @(posedge clk) begin
    if (rst) begin
      out_bus <= '0;
    end else begin
      out_bus.punct    <= in_bus.punct;
      out_bus.valid    <= in_bus.valid;
      out_bus.is_equal <= (in_bus.data.symbol == SYMBOL_KEY);
      out_bus.data     <= in_bus.data;
    end
  end

  // A word is either a tuple or a punctuation, never both.
  a_flags_exclusive: assert property (@(posedge clk) disable iff (rst)
                                      !(in_bus.punct && in_bus.valid));

endmodule
