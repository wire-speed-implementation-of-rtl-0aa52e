// Self-checking testbench of stage1_compare: random words, half of them with
// the query's symbol, are applied one per cycle; one cycle later the
// registered bus must carry the same flags and data and is_equal must equal
// (symbol == "UBSN"), worked out here from the string itself.
module tb_stage1_compare;
  import swa_pkg::*;

  logic       clk = 1'b0;
  logic       rst;
  trade_bus_t in_bus;
  sel_bus_t   out_bus;
  int         checks = 0, failures = 0;

  stage1_compare dut (.clk, .rst, .in_bus, .out_bus);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    trade_bus_t prev;
    logic [31:0] ubsn;
    ubsn = {8'("U"), 8'("B"), 8'("S"), 8'("N")};
    rst = 1'b1; in_bus = '0;
    repeat (2) @(negedge clk);
    checks++; if (out_bus.punct || out_bus.valid) failures++;
    rst = 1'b0;
    for (int n = 0; n < 500; n++) begin
      prev.data.symbol = ($urandom_range(1) == 1) ? ubsn : $urandom();
      if ($urandom_range(7) == 0) prev.data.symbol = ubsn ^ (32'h1 << $urandom_range(31));
      prev.data.price  = $urandom();
      prev.data.volume = $urandom();
      prev.data.tstamp = $urandom();
      prev.punct = ($urandom_range(3) == 0);
      prev.valid = !prev.punct && ($urandom_range(3) != 0);
      in_bus = prev;
      @(negedge clk);
      checks++;
      if (out_bus.is_equal !== (prev.data.symbol == ubsn) || out_bus.punct !== prev.punct ||
          out_bus.valid !== prev.valid || out_bus.data !== prev.data) begin
        failures++;
        $display("mismatch at word %0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
