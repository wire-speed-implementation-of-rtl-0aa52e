// End-to-end testbench of swa_q3_top at its default parameters (RANGE 600,
// SLIDE 60, SLACK 60, COUNT, symbol "UBSN", 11 windows).
//
// Stream generation, as a host would do it: tuples with random Time over one
// hour of stream time are drawn, a quarter of them with other symbols. Each
// tuple is given an arrival key Time + d, d random in [0, SLACK], and the
// stream is sent in key order, so that tuples arrive up to SLACK seconds out
// of order. A punctuation with value P = start + m*SLIDE is sent as soon as
// the stream has reached key P + SLACK; no later tuple can then have a Time
// below P. Idle cycles are sprinkled in, but long stretches run one word per
// cycle.
//
// Reference: window m covers [start + m*SLIDE, start + m*SLIDE + RANGE); the
// punctuation whose value equals its end must produce exactly one result,
// {Time = end, Number = UBSN tuples in the window}, four cycles after the
// punctuation is on the input. Every other cycle the output must be idle.
// Punctuations must also leave on out_bus.punct, four cycles after entry.
// The mechanisms the design relies on are counted and each must occur.
module tb_swa_q3_top;
  import swa_pkg::*;

  localparam int unsigned RANGE = 600, SLIDE = 60, SLACK = 60;
  localparam int unsigned N_WIN = 11;
  localparam int unsigned START = 100_000;
  localparam int unsigned DUR   = 3600;
  localparam int unsigned NTUP  = 4000;
  localparam int unsigned LAT   = 4;

  typedef struct {
    longint unsigned key;
    int unsigned     t;
    bit              ubsn;
  } gen_t;

  typedef struct {
    longint unsigned cycle;
    int unsigned     tstamp;
    int unsigned     number;
  } exp_t;

  logic        clk = 1'b0;
  logic        rst;
  logic [31:0] wattr_start;
  trade_bus_t  in_bus;
  result_bus_t out_bus;

  int              checks = 0, failures = 0;
  longint unsigned cycle = 0;
  exp_t            expq[$];
  longint unsigned punctq[$];   // cycles at which out_bus.punct is due
  int              n_punct_out = 0;
  bit              done = 1'b0;

  // mechanism counters
  int n_out_of_order = 0, n_filtered = 0, n_punct_idle = 0, n_punct_close = 0;
  int n_recycled = 0, n_idle = 0, n_results = 0, longest_run = 0;

  swa_q3_top dut (.clk, .rst, .wattr_start, .in_bus, .out_bus);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor: compare every result with the reference queue.
  always @(negedge clk) begin
    if (!rst) begin
      // punctuations must pass through to the output, 4 cycles later
      if (out_bus.punct) begin
        checks++; n_punct_out++;
        if (punctq.size() == 0 || punctq.pop_front() != cycle) begin
          failures++; $display("punctuation on output at unexpected cycle %0d", cycle);
        end
      end else if (punctq.size() != 0 && punctq[0] < cycle) begin
        checks++; failures++;
        $display("punctuation due at cycle %0d never left", punctq.pop_front());
      end
      if (out_bus.valid) begin
        checks++;
        if (expq.size() == 0) begin
          failures++; $display("unexpected result Time=%0d", out_bus.data.tstamp);
        end else begin
          exp_t x;
          x = expq.pop_front();
          n_results++;
          if (cycle != x.cycle || out_bus.data.tstamp !== x.tstamp ||
              out_bus.data.number !== x.number) begin
            failures++;
            $display("result: cycle %0d Time %0d Number %0d, expected cycle %0d Time %0d Number %0d",
                     cycle, out_bus.data.tstamp, out_bus.data.number, x.cycle, x.tstamp, x.number);
          end
        end
      end else if (expq.size() != 0 && expq[0].cycle < cycle) begin
        failures++; checks++;
        $display("missing result Time=%0d", expq[0].tstamp);
        void'(expq.pop_front());
      end
    end
  end

  function automatic logic [31:0] other_symbol();
    logic [31:0] s;
    do s = $urandom(); while (s == SYMBOL_UBSN);
    return s;
  endfunction

  initial begin
    gen_t        g[$];
    gen_t        x;
    int unsigned cnt [];
    int unsigned max_t, last_punct, nwin, idx, run;
    int unsigned closes [N_WIN];
    bit          any_punct;

    rst = 1'b1; in_bus = '0; wattr_start = START;
    repeat (3) @(negedge clk);

    // generate tuples and the reference window counts
    nwin = (DUR + RANGE) / SLIDE + 1;
    cnt = new[nwin];
    foreach (cnt[m]) cnt[m] = 0;
    for (int i = 0; i < NTUP; i++) begin
      x.t    = START + $urandom_range(DUR - 1);
      x.ubsn = ($urandom_range(3) != 0);
      x.key  = ((longint'(x.t) + longint'($urandom_range(SLACK))) << 20) | longint'($urandom_range(32'hFFFFF));
      g.push_back(x);
      if (x.ubsn)
        foreach (cnt[m])
          if (x.t >= START + m * SLIDE && x.t < START + m * SLIDE + RANGE) cnt[m]++;
    end
    g.sort() with (item.key);
    foreach (closes[i]) closes[i] = 0;

    rst = 1'b0;
    @(negedge clk);
    max_t = 0; last_punct = 0; any_punct = 1'b0; idx = 0; run = 0;
    for (int unsigned k = START; k <= START + DUR + RANGE + SLACK; k++) begin
      // punctuation P = k - SLACK on slide boundaries
      if (k >= START + SLACK && (k - SLACK - START) % SLIDE == 0) begin
        int unsigned p;
        p = k - SLACK;
        in_bus = '0; in_bus.punct = 1'b1; in_bus.data.tstamp = p;
        in_bus.data.symbol = other_symbol();
        if (p >= START + RANGE) begin
          int unsigned m;
          exp_t e;
          m = (p - START - RANGE) / SLIDE;
          e.cycle = cycle + longint'(LAT); e.tstamp = p; e.number = cnt[m];
          expq.push_back(e);
          n_punct_close++;
          closes[m % N_WIN]++;
          if (closes[m % N_WIN] > 1) n_recycled++;
        end else n_punct_idle++;
        punctq.push_back(cycle + longint'(LAT));
        last_punct = p; any_punct = 1'b1;
        @(negedge clk); run++;
      end
      while (idx < g.size() && (g[idx].key >> 20) == longint'(k)) begin
        x = g[idx++];
        if (any_punct && x.t < last_punct) begin
          failures++; $display("generator: tuple %0d behind punctuation %0d", x.t, last_punct);
        end
        if (x.t < max_t) n_out_of_order++;
        if (x.t > max_t) max_t = x.t;
        in_bus = '0; in_bus.valid = 1'b1;
        in_bus.data.symbol = x.ubsn ? SYMBOL_UBSN : other_symbol();
        if (!x.ubsn) n_filtered++;
        in_bus.data.price  = $urandom_range(50_000);
        in_bus.data.volume = $urandom_range(10_000);
        in_bus.data.tstamp = x.t;
        @(negedge clk); run++;
        if ($urandom_range(15) == 0) begin
          if (run > longest_run) longest_run = run;
          run = 0;
          in_bus = '0; n_idle++;
          @(negedge clk);
        end
      end
    end
    if (run > longest_run) longest_run = run;
    in_bus = '0;
    repeat (LAT + 4) @(negedge clk);

    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d results never came", expq.size()); end
    checks++;
    if (n_results != int'(DUR / SLIDE + 1)) begin
      failures++; $display("results %0d", n_results);
    end
    checks++;
    if (n_punct_out != n_punct_idle + n_punct_close) failures++;
    $display("mechanisms: punct_passed=%0d out_of_order=%0d filtered=%0d punct_no_close=%0d punct_close=%0d recycled=%0d idle=%0d longest_run=%0d",
             n_punct_out, n_out_of_order, n_filtered, n_punct_idle, n_punct_close, n_recycled, n_idle, longest_run);
    checks += 6;
    if (n_out_of_order == 0) failures++;
    if (n_filtered == 0)     failures++;
    if (n_punct_idle == 0)   failures++;
    if (n_punct_close == 0)  failures++;
    if (n_recycled == 0)     failures++;
    if (longest_run < 30)    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
