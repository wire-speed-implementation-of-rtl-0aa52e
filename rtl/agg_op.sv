// One incremental aggregate operator (COUNT, SUM, MIN or MAX, chosen by FUNC).
//
// Only the partial result of the current window is stored. When eis is high
// the value on the input is folded into it; when eos is high the window has
// ended and the partial result returns to the function's identity (COUNT and
// SUM 0, MIN all ones, MAX 0; values are unsigned). result always shows the
// stored partial result, so in the cycle eos is raised it still holds the
// final value of the closing window. eos takes priority over eis. The two
// control signals and the four functions are the document's; identities,
// unsigned arithmetic and wrap-around of SUM and COUNT are this design's.
module agg_op
  import swa_pkg::*;
#(
  parameter agg_func_e   FUNC = AGG_COUNT,
  parameter int unsigned W    = WORD_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         eis,
  input  logic         eos,
  input  logic [W-1:0] value,
  output logic [W-1:0] result
);

  localparam logic [W-1:0] IDENTITY = (FUNC == AGG_MIN) ? '1 : '0;

  logic [W-1:0] acc, next;

  always_comb begin
    unique case (FUNC)
      AGG_COUNT: next = acc + W'(1);
      AGG_SUM:   next = acc + value;
      AGG_MIN:   next = (value < acc) ? value : acc;
      AGG_MAX:   next = (value > acc) ? value : acc;
      default:   next = acc;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst || eos) acc <= IDENTITY;
    else if (eis)   acc <= next;
  end

  assign result = acc;

endmodule
