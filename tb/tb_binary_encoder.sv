// Self-checking testbench of binary_encoder (N = 11): every one-hot input
// must give its own index, zero must give any = 0, and random multi-hot
// inputs must give the lowest set index.
module tb_binary_encoder;
  localparam int N = 11;
  logic [N-1:0] req;
  logic [3:0]   sel;
  logic         any;
  int           checks = 0, failures = 0;

  binary_encoder #(.N(N)) dut (.req, .sel, .any);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; #1;
    checks++; if (any !== 1'b0) failures++;
    for (int i = 0; i < N; i++) begin
      req = N'(1) << i; #1;
      checks++;
      if (sel !== 4'(i) || any !== 1'b1) begin failures++; $display("one-hot %0d -> %0d", i, sel); end
    end
    for (int n = 0; n < 300; n++) begin
      int lo;
      req = N'($urandom());
      #1;
      lo = -1;
      for (int i = N - 1; i >= 0; i--) if (req[i]) lo = i;
      checks++;
      if (lo < 0 ? any !== 1'b0 : (any !== 1'b1 || sel !== 4'(lo))) begin
        failures++; $display("req %b -> sel %0d", req, sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
