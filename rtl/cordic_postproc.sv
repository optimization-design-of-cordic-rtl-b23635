// cordic_postproc: post-processing of the CORDIC sine/cosine unit.
//
// The core computed cos and sin of the angle folded into the first quadrant.
// The signs of the real angle's cosine and sine follow from its quadrant:
//   quadrant 1: cos =  c, sin =  s      quadrant 2: cos = -c, sin =  s
//   quadrant 3: cos = -c, sin = -s      quadrant 4: cos =  c, sin = -s
// which undoes the mirroring of cordic_preproc. The results are then rounded
// (half up) from FRAC to OUT_FRAC fraction bits and narrowed to OUT_W bits.
// Negating before rounding keeps the result symmetric about zero.
//
// Interface: in_valid/in_cos/in_sin/quad in; out_valid/cos_out/sin_out out.
// With the defaults the outputs are signed Q1.14: 1.0 = 16384.
// Timing: one register stage, latency 1 clock, a new input every clock.
// rst_n (synchronous, active low) clears out_valid only.
//
// Undoing the quadrant folding follows the described architecture; the output
// format and rounding are this design's choices. The core never produces a
// magnitude above 1.0, so no saturation is needed.
module cordic_postproc
  import cordic_pkg::*;
#(
  parameter int XY_W     = 20,
  parameter int FRAC     = 18,
  parameter int OUT_W    = 16,
  parameter int OUT_FRAC = 14
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [XY_W-1:0]  in_cos,
  input  logic signed [XY_W-1:0]  in_sin,
  input  quadrant_e               quad,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] cos_out,
  output logic signed [OUT_W-1:0] sin_out
);

  localparam int DROP = FRAC - OUT_FRAC;
  localparam logic signed [XY_W:0] HALF = (XY_W+1)'(1) << (DROP - 1);

  logic                    neg_cos, neg_sin;
  logic signed [XY_W:0]    c_s, s_s;  // one extra bit for the negation
  logic signed [OUT_W-1:0] c_r, s_r;

  always_comb begin
    neg_cos = (quad == QUAD_2) || (quad == QUAD_3);
    neg_sin = (quad == QUAD_3) || (quad == QUAD_4);
    c_s     = neg_cos ? -(XY_W+1)'(in_cos) : (XY_W+1)'(in_cos);
    s_s     = neg_sin ? -(XY_W+1)'(in_sin) : (XY_W+1)'(in_sin);
    c_r     = OUT_W'((c_s + HALF) >>> DROP);
    s_r     = OUT_W'((s_s + HALF) >>> DROP);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    cos_out <= c_r;
    sin_out <= s_r;
  end

endmodule
