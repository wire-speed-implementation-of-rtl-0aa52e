// Control module of one window instance (window number IDX, 1-based).
//
// Holds the bounds of the window this instance currently evaluates,
// win_begin (inclusive) and win_end (exclusive), and derives the two control
// signals of its aggregation module:
//   eis - the current word is a valid tuple whose WATTR lies in
//         [win_begin, win_end): the aggregate takes it in;
//   eos - the current word is a punctuation with WATTR >= win_end: no more
//         tuples of this window can arrive, its result is final and the
//         aggregate restarts.
// eis and eos are purely combinational from the current word and the bound
// registers, so the aggregate reacts in the same cycle. On the same clock
// edge as eos, both bounds advance by N_WIN*SLIDE and the instance is
// recycled for the window N_WIN slides later. While rst is high the bounds
// are loaded with WATTR_start + (IDX-1)*SLIDE and that value + RANGE.
// The update and signal rules follow the document's two algorithms; the
// unsigned comparison and the reset used for initialisation are this
// design's choices.
module win_control
  import swa_pkg::*;
#(
  parameter int unsigned RANGE = 600,
  parameter int unsigned SLIDE = 60,
  parameter int unsigned SLACK = 60,
  parameter int unsigned N_WIN = n_win(RANGE, SLIDE, SLACK),
  parameter int unsigned IDX   = 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [WORD_W-1:0] wattr_start,
  input  logic              punct,
  input  logic              valid,
  input  logic [WORD_W-1:0] wattr,
  output logic              eis,
  output logic              eos,
  output logic [WORD_W-1:0] win_end_o
);

  localparam logic [WORD_W-1:0] OFFSET  = WORD_W'((IDX - 1) * SLIDE);
  localparam logic [WORD_W-1:0] RANGE_W = WORD_W'(RANGE);
  localparam logic [WORD_W-1:0] STEP    = WORD_W'(N_WIN * SLIDE);

  logic [WORD_W-1:0] win_begin, win_end;
  logic              past_end;

  assign past_end  = (wattr >= win_end);
  assign win_end_o = win_end;

  // Window state (update rule of the first algorithm).
  always_ff @(posedge clk) begin
    if (rst) begin
      win_begin <= wattr_start + OFFSET;
      win_end   <= wattr_start + OFFSET + RANGE_W;
    end else if (punct && past_end) begin
      win_begin <= win_begin + STEP;
      win_end   <= win_end + STEP;
    end
  end

  // Control signals (second algorithm), combinational.
  always_comb begin
    if (!punct) begin
      eos = 1'b0;
      eis = valid && (wattr >= win_begin) && !past_end;
    end else begin
      eis = 1'b0;
      eos = past_end;
    end
  end

endmodule
