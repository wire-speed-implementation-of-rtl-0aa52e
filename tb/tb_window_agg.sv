// Self-checking testbench of window_agg (window 1 of 11, RANGE 600,
// SLIDE 60, SUM of Price). Random tuples, some outside the window, are sent
// in any order; then a punctuation at the window end. One cycle after the
// punctuation the module must report valid = 1, Time = window end and the
// reference sum of in-window prices; on other cycles valid must stay 0. The
// window is closed ten times to cover recycling.
module tb_window_agg;
  import swa_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic [31:0] wattr_start;
  trade_bus_t  in_bus;
  result_bus_t out_bus;
  int          checks = 0, failures = 0;

  window_agg #(.RANGE(600), .SLIDE(60), .SLACK(60), .IDX(1), .AGG_FUNC(AGG_SUM)) dut (
    .clk, .rst, .wattr_start, .in_bus, .out_bus
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned b, e, sum;
    rst = 1'b1; in_bus = '0; wattr_start = 5000;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    b = 5000; e = 5600;
    for (int w = 0; w < 10; w++) begin
      sum = 0;
      for (int k = 0; k < 50; k++) begin
        in_bus = '0;
        in_bus.valid = 1'b1;
        in_bus.data.tstamp = b - 60 + $urandom_range(720);
        in_bus.data.price  = $urandom_range(10000);
        if (in_bus.data.tstamp >= b && in_bus.data.tstamp < e) sum += in_bus.data.price;
        @(negedge clk);
        checks++;
        if (out_bus.valid !== 1'b0) failures++;
      end
      // a punctuation short of the end must not close the window
      in_bus = '0; in_bus.punct = 1'b1; in_bus.data.tstamp = e - 1;
      @(negedge clk);
      checks++;
      if (out_bus.valid !== 1'b0 || out_bus.punct !== 1'b1) failures++;
      in_bus.data.tstamp = e;
      @(negedge clk);
      checks += 3;
      if (out_bus.valid !== 1'b1) begin failures++; $display("window %0d not closed", w); end
      if (out_bus.data.tstamp !== e) begin failures++; $display("Time %0d vs %0d", out_bus.data.tstamp, e); end
      if (out_bus.data.number !== sum) begin failures++; $display("Number %0d vs %0d", out_bus.data.number, sum); end
      b += 660; e += 660;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
