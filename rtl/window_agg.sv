// Window-aggregation module: one window instance of Stage 3.
//
// A control module tracks the bounds of the window and raises eis for tuples
// inside it and eos for a punctuation that passes its end; an aggregation
// module folds accepted tuples (Price for SUM/MIN/MAX) into a partial result.
// All of this happens within one cycle. The Stage 3 output registers then
// hold, one cycle after the word was seen:
//   punct  - the punctuation flag, passed on;
//   valid  - eos: this window has just closed and data carries its result;
//   data   - {Time = win_end of the closed window, Number = final aggregate}.
// The composition follows the document; which bound is reported as Time and
// the meaning given to the two output flags are this design's choices.
module window_agg
  import swa_pkg::*;
#(
  parameter int unsigned RANGE    = 600,
  parameter int unsigned SLIDE    = 60,
  parameter int unsigned SLACK    = 60,
  parameter int unsigned N_WIN    = n_win(RANGE, SLIDE, SLACK),
  parameter int unsigned IDX      = 1,
  parameter agg_func_e   AGG_FUNC = AGG_COUNT
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [WORD_W-1:0] wattr_start,
  input  trade_bus_t        in_bus,
  output result_bus_t       out_bus
);

  logic              eis, eos;
  logic [WORD_W-1:0] win_end, number;

  win_control #(
    .RANGE(RANGE), .SLIDE(SLIDE), .SLACK(SLACK), .N_WIN(N_WIN), .IDX(IDX)
  ) u_ctrl (
    .clk, .rst, .wattr_start,
    .punct    (in_bus.punct),
    .valid    (in_bus.valid),
    .wattr    (in_bus.data.tstamp),
    .eis, .eos,
    .win_end_o(win_end)
  );

  win_aggregate #(.AGG_FUNC(AGG_FUNC)) u_aggr (
    .clk, .rst, .eis, .eos,
    .value (in_bus.data.price),
    .number
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      out_bus <= '0;
    end else begin
      out_bus.punct       <= in_bus.punct;
      out_bus.valid       <= eos;
      out_bus.data.tstamp <= win_end;
      out_bus.data.number <= number;
    end
  end

endmodule
