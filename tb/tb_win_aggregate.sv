// Self-checking testbench of win_aggregate: one instance per AGG_FUNC value
// on a shared random eis/eos/value sequence. Each selected Number is compared
// with a reference aggregate before every window end.
module tb_win_aggregate;
  import swa_pkg::*;

  logic        clk = 1'b0;
  logic        rst, eis, eos;
  logic [31:0] value;
  logic [31:0] num [4];
  logic [31:0] cnt, sum, mn, mx;
  int          checks = 0, failures = 0;

  win_aggregate #(.AGG_FUNC(AGG_COUNT)) u0 (.clk, .rst, .eis, .eos, .value, .number(num[0]));
  win_aggregate #(.AGG_FUNC(AGG_SUM))   u1 (.clk, .rst, .eis, .eos, .value, .number(num[1]));
  win_aggregate #(.AGG_FUNC(AGG_MIN))   u2 (.clk, .rst, .eis, .eos, .value, .number(num[2]));
  win_aggregate #(.AGG_FUNC(AGG_MAX))   u3 (.clk, .rst, .eis, .eos, .value, .number(num[3]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; eis = 1'b0; eos = 1'b0; value = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int w = 0; w < 60; w++) begin
      int len;
      cnt = 0; sum = 0; mn = '1; mx = 0;
      len = $urandom_range(40, 1);
      for (int k = 0; k < len; k++) begin
        eis = ($urandom_range(2) != 0); eos = 1'b0;
        value = $urandom_range(100000);
        @(negedge clk);
        if (eis) begin
          cnt++; sum += value;
          if (value < mn) mn = value;
          if (value > mx) mx = value;
        end
      end
      eis = 1'b0; eos = 1'b1;
      checks += 4;
      if (num[0] !== cnt) begin failures++; $display("COUNT %0d vs %0d", num[0], cnt); end
      if (num[1] !== sum) begin failures++; $display("SUM %0d vs %0d", num[1], sum); end
      if (num[2] !== mn)  begin failures++; $display("MIN %0d vs %0d", num[2], mn); end
      if (num[3] !== mx)  begin failures++; $display("MAX %0d vs %0d", num[3], mx); end
      @(negedge clk);
      eos = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
