// Stream driver and checker for one swa_q3_top instance, used by the
// workload testbench to run several query configurations side by side.
//
// It draws NTUP tuples with random Time over DUR seconds (a quarter with
// other symbols), sends them with up to SLACK seconds of disorder (arrival key
// = Time + random 0..SLACK, sorted) at one word per cycle, and sends a
// punctuation P = start + m*SLIDE once the keys have passed P + SLACK. Each
// window result must arrive four cycles after its punctuation and equal the
// COUNT, SUM, MIN or MAX of Price over the UBSN tuples of
// [end - RANGE, end) (empty window: 0 for COUNT, SUM and MAX, all ones for
// MIN). done rises when the stream is over; checks and failures are totals.
module swa_stream_bench
  import swa_pkg::*;
#(
  parameter int unsigned RANGE    = 600,
  parameter int unsigned SLIDE    = 60,
  parameter int unsigned SLACK    = 60,
  parameter agg_func_e   AGG_FUNC = AGG_COUNT,
  parameter int unsigned DUR      = 2 * RANGE,
  parameter int unsigned NTUP     = 2000,
  parameter int unsigned START    = 50_000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   results
);

  localparam int unsigned LAT  = 4;
  localparam int unsigned NWIN = DUR / SLIDE + 1;   // windows closed by the stream

  typedef struct {
    longint unsigned key;
    int unsigned     t;
    int unsigned     price;
    bit              ubsn;
  } gen_t;

  typedef struct {
    longint unsigned cycle;
    int unsigned     tstamp;
    int unsigned     number;
  } exp_t;

  logic            rst;
  logic [31:0]     wattr_start;
  trade_bus_t      in_bus;
  result_bus_t     out_bus;
  longint unsigned cycle = 0;
  exp_t            expq[$];

  swa_q3_top #(.RANGE(RANGE), .SLIDE(SLIDE), .SLACK(SLACK), .AGG_FUNC(AGG_FUNC)) dut (
    .clk, .rst, .wattr_start, .in_bus, .out_bus
  );

  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) begin
    if (!rst) begin
      if (out_bus.valid) begin
        checks++;
        if (expq.size() == 0) begin
          failures++; $display("[R%0d f%0d] unexpected result", RANGE, AGG_FUNC);
        end else begin
          exp_t x;
          x = expq.pop_front();
          results++;
          if (cycle != x.cycle || out_bus.data.tstamp !== x.tstamp || out_bus.data.number !== x.number) begin
            failures++;
            $display("[R%0d f%0d] got Time %0d Number %0d @%0d, want %0d %0d @%0d", RANGE, AGG_FUNC,
                     out_bus.data.tstamp, out_bus.data.number, cycle, x.tstamp, x.number, x.cycle);
          end
        end
      end else if (expq.size() != 0 && expq[0].cycle < cycle) begin
        checks++; failures++;
        $display("[R%0d f%0d] missing result Time %0d", RANGE, AGG_FUNC, expq[0].tstamp);
        void'(expq.pop_front());
      end
    end
  end

  initial begin
    gen_t        g[$];
    gen_t        x;
    int unsigned agg [NWIN];
    int unsigned idx;

    done = 1'b0; checks = 0; failures = 0; results = 0;
    rst = 1'b1; in_bus = '0; wattr_start = START;
    foreach (agg[m]) agg[m] = (AGG_FUNC == AGG_MIN) ? 32'hFFFF_FFFF : 0;
    for (int i = 0; i < NTUP; i++) begin
      x.t     = START + $urandom_range(DUR - 1);
      x.price = $urandom_range(100_000);
      x.ubsn  = ($urandom_range(3) != 0);
      x.key   = ((longint'(x.t) + longint'($urandom_range(SLACK))) << 20) | longint'($urandom_range(32'hFFFFF));
      g.push_back(x);
      if (x.ubsn)
        foreach (agg[m])
          if (x.t >= START + m * SLIDE && x.t < START + m * SLIDE + RANGE)
            case (AGG_FUNC)
              AGG_COUNT: agg[m] += 1;
              AGG_SUM:   agg[m] += x.price;
              AGG_MIN:   if (x.price < agg[m]) agg[m] = x.price;
              default:   if (x.price > agg[m]) agg[m] = x.price;
            endcase
    end
    g.sort() with (item.key);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    idx = 0;
    for (int unsigned k = START; k <= START + DUR + RANGE + SLACK; k++) begin
      if (k >= START + SLACK && (k - SLACK - START) % SLIDE == 0) begin
        int unsigned p;
        p = k - SLACK;
        in_bus = '0; in_bus.punct = 1'b1; in_bus.data.tstamp = p;
        if (p >= START + RANGE) begin
          exp_t e;
          e.cycle = cycle + longint'(LAT); e.tstamp = p; e.number = agg[(p - START - RANGE) / SLIDE];
          expq.push_back(e);
        end
        @(negedge clk);
      end
      while (idx < g.size() && (g[idx].key >> 20) == longint'(k)) begin
        x = g[idx++];
        in_bus = '0; in_bus.valid = 1'b1;
        in_bus.data.symbol = x.ubsn ? SYMBOL_UBSN : ~SYMBOL_UBSN;
        in_bus.data.price  = x.price;
        in_bus.data.tstamp = x.t;
        @(negedge clk);
      end
    end
    in_bus = '0;
    repeat (LAT + 4) @(negedge clk);
    checks++;
    if (expq.size() != 0 || results != int'(NWIN)) begin
      failures++; $display("[R%0d f%0d] %0d results, want %0d", RANGE, AGG_FUNC, results, NWIN);
    end
    done = 1'b1;
  end

endmodule
