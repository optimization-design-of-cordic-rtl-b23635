// tb_cordic_sincos: end-to-end test of the CORDIC sine/cosine unit at its
// default parameters.
//
// Phase 1 streams every one of the 2**PHASE_W input angles back to back, one
// per clock, so the pipeline runs at an initiation interval of 1. Phase 2
// sends random angles with random idle clocks (bubbles). Phase 3 fills the
// pipeline and then asserts reset, after which no result may appear.
// Every result is compared with $cos and $sin of the input angle within an
// error bound set by the last micro-rotation angle plus rounding, and must
// appear exactly LATENCY = ITERS + 2 = 13 clocks after its input.
// The test counts how often each mechanism happened: angles from each of the
// four quadrants folded and restored, back-to-back results, bubbles in the
// result stream, and a reset that flushed a full pipeline. A mechanism that
// never happened counts as a failure.
module tb_cordic_sincos;

  localparam int  PHASE_W  = 16;
  localparam int  ITERS    = 11;
  localparam int  OUT_W    = 16;
  localparam int  OUT_FRAC = 14;
  localparam int  LATENCY  = ITERS + 2;
  localparam int  N_RAND   = 5000;
  localparam real PI       = 3.14159265358979323846;
  // error bound: residual angle + iteration truncation + angle quantisation
  // + output rounding
  localparam real TOL = $atan(2.0 ** (-(ITERS - 1))) + real'(ITERS + 4) * (2.0 ** (-18))
                        + real'(ITERS) * PI / (2.0 ** (PHASE_W + 2)) + (2.0 ** (-OUT_FRAC));

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  logic                    in_valid = 1'b0;
  logic [PHASE_W-1:0]      phase = '0;
  logic                    out_valid;
  logic signed [OUT_W-1:0] cos_out, sin_out;

  int checks = 0;
  int failures = 0;
  longint cycle = 0;

  typedef struct {
    int     p;
    longint cyc;
  } sent_t;
  sent_t sent [$];

  int  n_quad [4] = '{0, 0, 0, 0};
  int  n_back_to_back = 0;
  int  n_bubble = 0;
  int  n_flush = 0;
  bit  prev_out_valid = 1'b0;
  bit  seen_output = 1'b0;
  real max_err = 0.0;

  cordic_sincos dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat ((1 << PHASE_W) + 3 * N_RAND + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n && in_valid) sent.push_back('{int'(phase), cycle});
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      sent_t s;
      real th, ec, es;
      checks++;
      if (prev_out_valid) n_back_to_back++;
      else if (seen_output) n_bubble++;
      seen_output = 1'b1;
      if (sent.size() == 0) begin
        failures++;
        $display("FAIL output without input at cycle %0d", cycle);
      end else begin
        s  = sent.pop_front();
        th = real'(s.p) * 2.0 * PI / (2.0 ** PHASE_W);
        ec = real'(cos_out) / (2.0 ** OUT_FRAC) - $cos(th);
        es = real'(sin_out) / (2.0 ** OUT_FRAC) - $sin(th);
        ec = (ec < 0.0) ? -ec : ec;
        es = (es < 0.0) ? -es : es;
        if (ec > max_err) max_err = ec;
        if (es > max_err) max_err = es;
        if (ec <= TOL && es <= TOL) n_quad[s.p >> (PHASE_W - 2)]++;
        if (ec > TOL || es > TOL || cycle - s.cyc != longint'(LATENCY)) begin
          failures++;
          $display("FAIL phase=%h: cos %0d sin %0d errors %g %g (tol %g) latency %0d",
                   s.p, cos_out, sin_out, ec, es, TOL, cycle - s.cyc);
        end
      end
    end
    prev_out_valid = rst_n && out_valid;
  end

  task automatic send(input int p);
    @(negedge clk);
    in_valid <= 1'b1;
    phase    <= PHASE_W'(p);
  endtask

  task automatic idle();
    @(negedge clk);
    in_valid <= 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // 1: exhaustive sweep, interval 1
    for (int p = 0; p < (1 << PHASE_W); p++) send(p);

    // 2: random angles with bubbles
    for (int i = 0; i < N_RAND; i++) begin
      send(int'($urandom_range(0, (1 << PHASE_W) - 1)));
      if ($urandom_range(0, 2) == 0) idle();
    end
    idle();
    repeat (LATENCY + 2) @(posedge clk);

    // 3: fill the pipeline, then reset it
    for (int i = 0; i < LATENCY - 3; i++) send(int'($urandom_range(0, (1 << PHASE_W) - 1)));
    idle();
    @(negedge clk);
    rst_n <= 1'b0;
    @(negedge clk);
    rst_n <= 1'b1;
    sent.delete();
    repeat (LATENCY + 5) begin
      @(posedge clk);
      #1;
      checks++;
      if (out_valid) begin
        failures++;
        $display("FAIL result after reset");
      end
    end
    n_flush++;

    // every input must have produced its result
    checks++;
    if (sent.size() != 0) begin
      failures++;
      $display("FAIL %0d inputs never came out", sent.size());
    end
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (n_quad[q] == 0) begin
        failures++;
        $display("FAIL no correct result from quadrant %0d", q + 1);
      end
    end
    checks++;
    if (n_back_to_back == 0 || n_bubble == 0 || n_flush == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("quadrants 1..4 results: %0d %0d %0d %0d", n_quad[0], n_quad[1], n_quad[2], n_quad[3]);
    $display("back-to-back results: %0d, results after a bubble: %0d, reset flushes: %0d",
             n_back_to_back, n_bubble, n_flush);
    $display("max abs error %g (bound %g), latency %0d clocks", max_err, TOL, LATENCY);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
