// tb_cordic_core: self-checking test of the unrolled CORDIC pipeline.
//
// Two cores, one with the default 11 iterations and one with 16, are fed a
// new angle in [-pi/2, pi/2] on most clocks (with random idle clocks). Every
// result is checked against $cos and $sin of the input angle, within an
// error bound set by the last micro-rotation angle arctan(2**-(ITERS-1))
// plus a few units of rounding, and must leave exactly ITERS clocks after
// its input with the same tag. The test also checks that the error of the
// 16-iteration core stays below that of the 11-iteration bound.
module tb_cordic_core;

  localparam int  XY_W   = 20;
  localparam int  FRAC   = 18;
  localparam int  Z_W    = 18;
  localparam int  TAG_W  = 2;
  localparam int  N_RAND = 3000;
  localparam real PI     = 3.14159265358979323846;
  localparam int  IT [2] = '{11, 16};

  logic                   clk = 1'b0;
  logic                   rst_n = 1'b0;
  logic                   in_valid = 1'b0;
  logic signed [Z_W-1:0]  in_z = '0;
  logic [TAG_W-1:0]       in_tag = '0;
  logic                   out_valid [2];
  logic signed [XY_W-1:0] out_cos [2];
  logic signed [XY_W-1:0] out_sin [2];
  logic [TAG_W-1:0]       out_tag [2];

  int checks = 0;
  int failures = 0;
  longint cycle = 0;

  typedef struct {
    longint z;
    int     tag;
    longint cyc;
  } sent_t;
  sent_t sent [2][$];
  real   max_err [2] = '{0.0, 0.0};

  cordic_core #(.ITERS(11), .XY_W(XY_W), .FRAC(FRAC), .Z_W(Z_W), .TAG_W(TAG_W)) dut0 (
    .clk, .rst_n, .in_valid, .in_z, .in_tag,
    .out_valid(out_valid[0]), .out_cos(out_cos[0]), .out_sin(out_sin[0]), .out_tag(out_tag[0]));
  cordic_core #(.ITERS(16), .XY_W(XY_W), .FRAC(FRAC), .Z_W(Z_W), .TAG_W(TAG_W)) dut1 (
    .clk, .rst_n, .in_valid, .in_z, .in_tag,
    .out_valid(out_valid[1]), .out_cos(out_cos[1]), .out_sin(out_sin[1]), .out_tag(out_tag[1]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2 * N_RAND + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  // Record what enters, sampled at the clock edge that loads stage 0.
  always @(posedge clk) begin
    if (rst_n && in_valid)
      for (int k = 0; k < 2; k++) sent[k].push_back('{longint'(in_z), int'(in_tag), cycle});
  end

  // Check what leaves.
  always @(negedge clk) begin
    for (int k = 0; k < 2; k++) begin
      if (rst_n && out_valid[k]) begin
        sent_t s;
        real th, ec, es, tol;
        checks++;
        if (sent[k].size() == 0) begin
          failures++;
          $display("FAIL core %0d: output without input", k);
        end else begin
          s   = sent[k].pop_front();
          th  = real'(s.z) * 2.0 * PI / (2.0 ** Z_W);
          ec  = real'(out_cos[k]) / (2.0 ** FRAC) - $cos(th);
          es  = real'(out_sin[k]) / (2.0 ** FRAC) - $sin(th);
          ec  = (ec < 0.0) ? -ec : ec;
          es  = (es < 0.0) ? -es : es;
          if (ec > max_err[k]) max_err[k] = ec;
          if (es > max_err[k]) max_err[k] = es;
          tol = $atan(2.0 ** (-(IT[k] - 1))) + real'(IT[k] + 4) * (2.0 ** (-FRAC))
                + real'(IT[k]) * PI / (2.0 ** Z_W);
          if (ec > tol || es > tol || int'(out_tag[k]) != s.tag ||
              cycle - s.cyc != longint'(IT[k])) begin
            failures++;
            $display("FAIL core %0d z=%0d: cos err %g sin err %g tol %g tag %0d/%0d latency %0d",
                     k, s.z, ec, es, tol, out_tag[k], s.tag, cycle - s.cyc);
          end
        end
      end
    end
  end

  task automatic send(input longint z);
    @(negedge clk);
    in_valid <= 1'b1;
    in_z     <= Z_W'(z);
    in_tag   <= TAG_W'($urandom);
  endtask

  task automatic idle();
    @(negedge clk);
    in_valid <= 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    send(0);
    send(2 ** (Z_W - 2));       // pi/2
    send(-(2 ** (Z_W - 2)));    // -pi/2
    send(2 ** (Z_W - 3));       // pi/4
    for (int i = 0; i < N_RAND; i++) begin
      send(longint'($urandom_range(0, 2 ** (Z_W - 1))) - 2 ** (Z_W - 2));
      if ($urandom_range(0, 3) == 0) idle();
    end
    idle();
    repeat (20) @(posedge clk);
    for (int k = 0; k < 2; k++) begin
      checks++;
      if (sent[k].size() != 0) begin
        failures++;
        $display("FAIL core %0d: %0d inputs never came out", k, sent[k].size());
      end
      $display("core with %0d iterations: max abs error %g", IT[k], max_err[k]);
    end
    checks++;
    if (max_err[1] >= $atan(2.0 ** (-10))) begin
      failures++;
      $display("FAIL 16 iterations not more accurate than the 11-iteration bound");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
