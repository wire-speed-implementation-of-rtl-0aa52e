// Self-checking testbench of union_n (N = 11): random result words, with
// zero or one valid input per cycle, are applied; one cycle later the output
// must carry the valid input's {Time, Number}, valid = OR of the inputs and
// punct = OR of the input punctuation flags.
module tb_union_n;
  import swa_pkg::*;
  localparam int N = 11;

  logic        clk = 1'b0;
  logic        rst;
  result_bus_t in_bus [N];
  result_bus_t out_bus;
  int          checks = 0, failures = 0;

  union_n #(.N(N)) dut (.clk, .rst, .in_bus, .out_bus);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int      hot;
    logic    p;
    result_t exp_d;
    rst = 1'b1;
    for (int i = 0; i < N; i++) in_bus[i] = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      hot = $urandom_range(N + 3) ;          // >= N: no valid input
      p   = ($urandom_range(1) == 1);
      for (int i = 0; i < N; i++) begin
        in_bus[i].punct = p;
        in_bus[i].valid = (i == hot);
        in_bus[i].data  = {$urandom(), $urandom()};
      end
      if (hot < N) exp_d = in_bus[hot].data;
      @(negedge clk);
      checks += 2;
      if (out_bus.valid !== (hot < N) || out_bus.punct !== p) begin failures++; $display("flags %0d", n); end
      if (hot < N && out_bus.data !== exp_d) begin failures++; $display("data from %0d", hot); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
