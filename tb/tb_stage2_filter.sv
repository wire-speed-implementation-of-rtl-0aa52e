// Self-checking testbench of stage2_filter: every combination of punct,
// valid and is_equal plus random data; one cycle later data valid must be
// valid AND is_equal, with punct and data unchanged.
module tb_stage2_filter;
  import swa_pkg::*;

  logic       clk = 1'b0;
  logic       rst;
  sel_bus_t   in_bus;
  trade_bus_t out_bus;
  int         checks = 0, failures = 0;

  stage2_filter dut (.clk, .rst, .in_bus, .out_bus);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel_bus_t w;
    rst = 1'b1; in_bus = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 400; n++) begin
      {w.punct, w.valid, w.is_equal} = 3'(n % 8);
      w.data = {$urandom(), $urandom(), $urandom(), $urandom()};
      in_bus = w;
      @(negedge clk);
      checks++;
      if (out_bus.valid !== (w.valid && w.is_equal) || out_bus.punct !== w.punct ||
          out_bus.data !== w.data) begin
        failures++;
        $display("mismatch at word %0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
