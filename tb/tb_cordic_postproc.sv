// tb_cordic_postproc: self-checking test of the sign restoration and rounding.
//
// Random first-quadrant cos/sin pairs (and the extremes 0 and 1.0) are sent
// with each of the four quadrants. One clock later the outputs must equal
// the reference: the sign flips of the quadrant applied in real arithmetic,
// then rounded half up from FRAC to OUT_FRAC fraction bits with floor(v+0.5).
module tb_cordic_postproc;
  import cordic_pkg::*;

  localparam int XY_W     = 20;
  localparam int FRAC     = 18;
  localparam int OUT_W    = 16;
  localparam int OUT_FRAC = 14;
  localparam int N_RAND   = 2000;

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  logic                    in_valid = 1'b0;
  logic signed [XY_W-1:0]  in_cos = '0, in_sin = '0;
  quadrant_e               quad = QUAD_1;
  logic                    out_valid;
  logic signed [OUT_W-1:0] cos_out, sin_out;

  int checks = 0;
  int failures = 0;

  cordic_postproc #(.XY_W(XY_W), .FRAC(FRAC), .OUT_W(OUT_W), .OUT_FRAC(OUT_FRAC)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (4 * N_RAND + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rnd(input real v);
    return longint'($floor(v * (2.0 ** OUT_FRAC) + 0.5));
  endfunction

  task automatic apply(input longint c, input longint s, input int q);
    real sc, ss;
    longint ec, es;
    in_valid <= 1'b1;
    in_cos   <= XY_W'(c);
    in_sin   <= XY_W'(s);
    quad     <= quadrant_e'(q);
    @(posedge clk);
    in_valid <= 1'b0;
    #1;
    sc = (q == 1 || q == 2) ? -1.0 : 1.0;
    ss = (q == 2 || q == 3) ? -1.0 : 1.0;
    ec = rnd(sc * real'(c) / (2.0 ** FRAC));
    es = rnd(ss * real'(s) / (2.0 ** FRAC));
    checks++;
    if (!out_valid || longint'(cos_out) != ec || longint'(sin_out) != es) begin
      failures++;
      $display("FAIL q=%0d in (%0d,%0d): out (%0d,%0d) exp (%0d,%0d)",
               q + 1, c, s, cos_out, sin_out, ec, es);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int q = 0; q < 4; q++) begin
      apply(2 ** FRAC, 0, q);
      apply(0, 2 ** FRAC, q);
      apply(8, 24, q);  // exact halves of an output step
      for (int i = 0; i < N_RAND; i++)
        apply(longint'($urandom_range(0, 2 ** FRAC)), longint'($urandom_range(0, 2 ** FRAC)), q);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
