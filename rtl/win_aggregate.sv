// Aggregation module of one window instance.
//
// Four aggregate operators - COUNT, SUM, MIN and MAX - run side by side on
// the same eis/eos pair and the same input value; a multiplexer picks the one
// the query asks for (AGG_FUNC) as the window's Number. AVERAGE is obtained
// outside as SUM/COUNT. All four operators are kept, as in the document, so
// that the query can be switched by changing one parameter; the unselected
// ones are removed by synthesis. The aggregated attribute (Price) is chosen
// by the enclosing module. Timing: the result reflects every tuple accepted
// up to the previous clock edge.
module win_aggregate
  import swa_pkg::*;
#(
  parameter agg_func_e AGG_FUNC = AGG_COUNT
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              eis,
  input  logic              eos,
  input  logic [WORD_W-1:0] value,
  output logic [WORD_W-1:0] number
);

  logic [WORD_W-1:0] res [4];

  agg_op #(.FUNC(AGG_COUNT)) u_count (.clk, .rst, .eis, .eos, .value, .result(res[AGG_COUNT]));
  agg_op #(.FUNC(AGG_SUM))   u_sum   (.clk, .rst, .eis, .eos, .value, .result(res[AGG_SUM]));
  agg_op #(.FUNC(AGG_MIN))   u_min   (.clk, .rst, .eis, .eos, .value, .result(res[AGG_MIN]));
  agg_op #(.FUNC(AGG_MAX))   u_max   (.clk, .rst, .eis, .eos, .value, .result(res[AGG_MAX]));

  assign number = res[AGG_FUNC];

endmodule
