// Stage 2 of the query pipeline: selection, filter half.
//
// An AND of data valid and is_equal decides whether a tuple survives the
// WHERE clause; a tuple that fails it leaves this stage with data valid
// cleared. The is_equal bit is dropped, the punctuation flag and data fields
// pass through untouched. Registered: one cycle of latency, one word per
// cycle. Structure per the document; the synchronous active-high reset is
// this design's choice.
module stage2_filter
  import swa_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  sel_bus_t   in_bus,
  output trade_bus_t out_bus
);

  always_ff @(posedge clk) begin
    if (rst) begin
      out_bus <= '0;
    end else begin
      out_bus.punct <= in_bus.punct;
      out_bus.valid <= in_bus.valid & in_bus.is_equal;
      out_bus.data  <= in_bus.data;
    end
  end

endmodule
