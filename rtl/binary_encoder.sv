// Binary encoder of Stage 4: turns the N per-window "result present" bits
// into the index that selects the union multiplexer's input.
//
// Purely combinational. any is high when at least one bit is set. The
// pipeline is fed so that one window closes per punctuation, making req
// one-hot; should several bits be set anyway, the lowest index wins
// (priority encoding, this design's choice).
module binary_encoder #(
  parameter int unsigned N     = 11,
  parameter int unsigned SEL_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]     req,
  output logic [SEL_W-1:0] sel,
  output logic             any
);

  always_comb begin
    sel = '0;
    any = 1'b0;
    for (int i = N - 1; i >= 0; i--) begin
      if (req[i]) begin
        sel = SEL_W'(i);
        any = 1'b1;
      end
    end
  end

endmodule
