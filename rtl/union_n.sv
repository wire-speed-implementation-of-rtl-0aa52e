// n-way union of Stage 4: merges the result streams of the N window-
// aggregation modules into one.
//
// A binary encoder turns the valid bits of the N Stage 3 outputs into a
// select index; a multiplexer passes the selected window's {Time, Number} to
// the Stage 4 output registers. The output valid flag is the OR of the input
// valid bits, the output punctuation flag the OR of the input punctuation
// flags (all windows carry the same one). One cycle of latency. Multiplexer,
// encoder and output registers follow the document; flag handling and the
// synchronous active-high reset are this design's choices.
module union_n
  import swa_pkg::*;
#(
  parameter int unsigned N = 11
) (
  input  logic        clk,
  input  logic        rst,
  input  result_bus_t in_bus [N],
  output result_bus_t out_bus
);

  localparam int unsigned SEL_W = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0]     valid_vec, punct_vec;
  logic [SEL_W-1:0] sel;
  logic             any;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      valid_vec[i] = in_bus[i].valid;
      punct_vec[i] = in_bus[i].punct;
    end
  end

  binary_encoder #(.N(N), .SEL_W(SEL_W)) u_enc (.req(valid_vec), .sel, .any);

  always_ff @(posedge clk) begin
    if (rst) begin
      out_bus <= '0;
    end else begin
      out_bus.punct <= |punct_vec;
      out_bus.valid <= any;
      out_bus.data  <= in_bus[sel].data;
    end
  end

endmodule
