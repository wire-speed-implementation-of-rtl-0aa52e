// Self-checking testbench of agg_op: the four functions are instantiated side
// by side on one random eis/eos/value sequence, and each result is compared
// every cycle with a reference partial result kept here. Windows end at
// random points (eos), after which the result must show the identity value.
module tb_agg_op;
  import swa_pkg::*;

  logic        clk = 1'b0;
  logic        rst, eis, eos;
  logic [31:0] value;
  logic [31:0] res [4];
  logic [31:0] ref_v [4];
  int          checks = 0, failures = 0;

  agg_op #(.FUNC(AGG_COUNT)) u0 (.clk, .rst, .eis, .eos, .value, .result(res[0]));
  agg_op #(.FUNC(AGG_SUM))   u1 (.clk, .rst, .eis, .eos, .value, .result(res[1]));
  agg_op #(.FUNC(AGG_MIN))   u2 (.clk, .rst, .eis, .eos, .value, .result(res[2]));
  agg_op #(.FUNC(AGG_MAX))   u3 (.clk, .rst, .eis, .eos, .value, .result(res[3]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void ref_reset();
    ref_v[0] = 0; ref_v[1] = 0; ref_v[2] = 32'hFFFF_FFFF; ref_v[3] = 0;
  endfunction

  initial begin
    rst = 1'b1; eis = 1'b0; eos = 1'b0; value = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    ref_reset();
    for (int n = 0; n < 3000; n++) begin
      for (int f = 0; f < 4; f++) begin
        checks++;
        if (res[f] !== ref_v[f]) begin
          failures++; $display("cycle %0d func %0d: got %0d want %0d", n, f, res[f], ref_v[f]);
        end
      end
      eos   = ($urandom_range(29) == 0);
      eis   = !eos && ($urandom_range(2) != 0);
      value = ($urandom_range(1) == 1) ? $urandom_range(1000) : $urandom();
      @(negedge clk);
      if (eos) ref_reset();
      else if (eis) begin
        ref_v[0] += 1;
        ref_v[1] += value;
        if (value < ref_v[2]) ref_v[2] = value;
        if (value > ref_v[3]) ref_v[3] = value;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
