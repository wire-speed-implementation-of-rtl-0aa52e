// Self-checking testbench of win_control (window 3 of 11, RANGE 600,
// SLIDE 60, start time 1000). Random tuples and punctuations with Time
// around the current window are applied; eis/eos are checked in the same
// cycle against a reference window [b, e) kept here, and the window must move
// by N_WIN*SLIDE = 660 on every punctuation at or past its end.
module tb_win_control;
  import swa_pkg::*;

  localparam int unsigned RANGE = 600, SLIDE = 60, SLACK = 60, IDX = 3;

  logic        clk = 1'b0;
  logic        rst, punct, valid, eis, eos;
  logic [31:0] wattr_start, wattr, win_end_o;
  int          checks = 0, failures = 0;
  int unsigned b, e, advances = 0;

  win_control #(.RANGE(RANGE), .SLIDE(SLIDE), .SLACK(SLACK), .IDX(IDX)) dut (
    .clk, .rst, .wattr_start, .punct, .valid, .wattr, .eis, .eos, .win_end_o
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_eis, exp_eos;
    rst = 1'b1; punct = 1'b0; valid = 1'b0; wattr = '0; wattr_start = 1000;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    b = 1000 + (IDX - 1) * SLIDE;
    e = b + RANGE;
    for (int n = 0; n < 4000; n++) begin
      punct = ($urandom_range(4) == 0);
      valid = !punct && ($urandom_range(3) != 0);
      wattr = b - 100 + $urandom_range(RANGE + 200);
      if ($urandom_range(9) == 0) wattr = e;       // exact boundaries
      if ($urandom_range(9) == 0) wattr = b;
      #1;
      exp_eis = !punct && valid && wattr >= b && wattr < e;
      exp_eos = punct && wattr >= e;
      checks += 3;
      if (eis !== exp_eis) begin failures++; $display("eis %0d: t=%0d [%0d,%0d)", n, wattr, b, e); end
      if (eos !== exp_eos) begin failures++; $display("eos %0d: t=%0d [%0d,%0d)", n, wattr, b, e); end
      if (win_end_o !== e) begin failures++; $display("win_end %0d vs %0d", win_end_o, e); end
      @(negedge clk);
      if (exp_eos) begin
        b += 11 * SLIDE; e += 11 * SLIDE; advances++;
      end
    end
    checks++;
    if (advances < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
