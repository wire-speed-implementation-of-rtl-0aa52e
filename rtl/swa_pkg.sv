// Shared types and constants of the sliding-window aggregate query pipeline.
//
// A stream word is a trade tuple of four 32-bit attributes {Symbol, Price,
// Volume, Time} plus two one-bit flags: the punctuation flag (the word is a
// punctuation whose Time field says that no later tuple will carry a smaller
// Time) and data valid (the word is a tuple). Results leave the pipeline as
// {Time, Number} with the same two flags. The tuple layout and the four
// aggregate functions follow the query in the document; the bit order inside
// the structs and the flag-exclusivity rule are this design's choices.
package swa_pkg;

  localparam int unsigned WORD_W = 32;

  // "UBSN" as four ASCII bytes, first character in the most significant byte.
  localparam logic [WORD_W-1:0] SYMBOL_UBSN = 32'h5542_534E;

  typedef struct packed {
    logic [WORD_W-1:0] symbol;
    logic [WORD_W-1:0] price;
    logic [WORD_W-1:0] volume;
    logic [WORD_W-1:0] tstamp;   // windowing attribute (WATTR = Time)
  } trade_t;

  // Input stream word (Fig. 1 wiring interface).
  typedef struct packed {
    logic   punct;
    logic   valid;
    trade_t data;
  } trade_bus_t;

  // Stage 1 output: the word plus the result of the Symbol comparison.
  typedef struct packed {
    logic   punct;
    logic   valid;
    logic   is_equal;
    trade_t data;
  } sel_bus_t;

  typedef struct packed {
    logic [WORD_W-1:0] tstamp;   // Time of the result (end of the window)
    logic [WORD_W-1:0] number;   // aggregate value
  } result_t;

  typedef struct packed {
    logic    punct;
    logic    valid;
    result_t data;
  } result_bus_t;

  typedef enum logic [1:0] {
    AGG_COUNT = 2'd0,
    AGG_SUM   = 2'd1,
    AGG_MIN   = 2'd2,
    AGG_MAX   = 2'd3
  } agg_func_e;

  // Number of window-aggregation modules, Eq. 1 and 2:
  //   N_WIN = ceil(RANGE/SLIDE) + x,  x a positive integer,
  //   x >= (SLACK + RANGE)/SLIDE - ceil(RANGE/SLIDE).
  // The smallest such x is taken.
  function automatic int unsigned n_win(int unsigned range, int unsigned slide,
                                        int unsigned slack);
    int unsigned c, need, x;
    c    = (range + slide - 1) / slide;
    need = (slack + range + slide - 1) / slide;   // ceil((SLACK+RANGE)/SLIDE)
    x    = (need > c + 1) ? need - c : 1;
    return c + x;
  endfunction

endpackage
