// Sliding-window aggregate query Q3 over an out-of-order trade stream:
//   SELECT Time, count(*) FROM Trades [RANGE 600 SLIDE 60 WATTR Time]
//   WHERE Symbol = "UBSN"
// as a four-stage pipeline that takes one word (tuple or punctuation) per
// clock cycle.
//   Stage 1  compare Symbol with the query constant  (stage1_compare)
//   Stage 2  clear data valid of non-matching tuples  (stage2_filter)
//   Stage 3  N_WIN window-aggregation modules, each evaluating one of the
//            overlapping windows on every word in the same cycle (window_agg)
//   Stage 4  n-way union of the window results        (union_n)
// Tuples need no reordering: each is counted by every window whose
// [begin, end) range holds its Time, whatever order it arrives in. A
// punctuation with Time P closes the window whose end is <= P, and that
// window's result {Time = window end, Number} appears on out_bus four clock
// edges after the punctuation is presented on in_bus. N_WIN comes from RANGE,
// SLIDE and SLACK (the largest disorder the stream may show), as in the
// document: 11 windows for the defaults. wattr_start, the start time of the
// query, is loaded into the windows while rst is high. Reset is synchronous
// and active high (this design's choice).
module swa_q3_top
  import swa_pkg::*;
#(
  parameter int unsigned       RANGE      = 600,
  parameter int unsigned       SLIDE      = 60,
  parameter int unsigned       SLACK      = 60,
  parameter agg_func_e         AGG_FUNC   = AGG_COUNT,
  parameter logic [WORD_W-1:0] SYMBOL_KEY = SYMBOL_UBSN
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [WORD_W-1:0] wattr_start,
  input  trade_bus_t        in_bus,
  output result_bus_t       out_bus
);

  localparam int unsigned N_WIN = n_win(RANGE, SLIDE, SLACK);

  sel_bus_t    s1;
  trade_bus_t  s2;
  result_bus_t s3 [N_WIN];

  stage1_compare #(.SYMBOL_KEY(SYMBOL_KEY)) u_stage1 (
    .clk, .rst, .in_bus, .out_bus(s1)
  );

  stage2_filter u_stage2 (.clk, .rst, .in_bus(s1), .out_bus(s2));

  for (genvar i = 0; i < N_WIN; i++) begin : g_win
    window_agg #(
      .RANGE(RANGE), .SLIDE(SLIDE), .SLACK(SLACK), .N_WIN(N_WIN),
      .IDX(i + 1), .AGG_FUNC(AGG_FUNC)
    ) u_win (
      .clk, .rst, .wattr_start, .in_bus(s2), .out_bus(s3[i])
    );
  end

  union_n #(.N(N_WIN)) u_union (.clk, .rst, .in_bus(s3), .out_bus);

endmodule
