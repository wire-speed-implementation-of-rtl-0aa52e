// Workload testbench: the query configurations evaluated for the design,
// each on its own pipeline instance and its own disordered stream
// (SLACK = 60 s, SLIDE = 60 s):
//   COUNT with RANGE 10, 20, 30, 40, 50 and 60 minutes (11 ... 61 windows);
//   SUM, MIN and MAX of Price with RANGE 10 minutes.
// Each instance checks every window result and its 4-cycle latency; this
// module adds up the totals.
module tb_swa_workloads;
  import swa_pkg::*;

  localparam int NB = 9;

  logic clk = 1'b0;
  logic done [NB];
  int   c [NB], f [NB], r [NB];
  int   checks, failures;

  always #5 clk = ~clk;

  swa_stream_bench #(.RANGE(600))                        b0 (.clk, .done(done[0]), .checks(c[0]), .failures(f[0]), .results(r[0]));
  swa_stream_bench #(.RANGE(1200))                       b1 (.clk, .done(done[1]), .checks(c[1]), .failures(f[1]), .results(r[1]));
  swa_stream_bench #(.RANGE(1800))                       b2 (.clk, .done(done[2]), .checks(c[2]), .failures(f[2]), .results(r[2]));
  swa_stream_bench #(.RANGE(2400))                       b3 (.clk, .done(done[3]), .checks(c[3]), .failures(f[3]), .results(r[3]));
  swa_stream_bench #(.RANGE(3000))                       b4 (.clk, .done(done[4]), .checks(c[4]), .failures(f[4]), .results(r[4]));
  swa_stream_bench #(.RANGE(3600))                       b5 (.clk, .done(done[5]), .checks(c[5]), .failures(f[5]), .results(r[5]));
  swa_stream_bench #(.RANGE(600), .AGG_FUNC(AGG_SUM))    b6 (.clk, .done(done[6]), .checks(c[6]), .failures(f[6]), .results(r[6]));
  swa_stream_bench #(.RANGE(600), .AGG_FUNC(AGG_MIN))    b7 (.clk, .done(done[7]), .checks(c[7]), .failures(f[7]), .results(r[7]));
  swa_stream_bench #(.RANGE(600), .AGG_FUNC(AGG_MAX))    b8 (.clk, .done(done[8]), .checks(c[8]), .failures(f[8]), .results(r[8]));

  function automatic void report(int extra_fail);
    checks = 0; failures = extra_fail;
    for (int i = 0; i < NB; i++) begin
      checks += c[i]; failures += f[i];
      $display("config %0d: results=%0d checks=%0d failures=%0d", i, r[i], c[i], f[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endfunction

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    $display("watchdog expired");
    report(1);
    $finish;
  end

  initial begin
    bit all;
    do begin
      @(posedge clk);
      all = 1'b1;
      for (int i = 0; i < NB; i++) all &= done[i];
    end while (!all);
    report(0);
    $finish;
  end
endmodule
