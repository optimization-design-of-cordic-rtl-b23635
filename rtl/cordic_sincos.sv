// cordic_sincos: pipelined CORDIC sine/cosine unit (top level).
//
// Computes cos(theta) and sin(theta) of an angle with additions and shifts
// only. Three parts in series:
//   cordic_preproc   mirrors theta into [0, pi/2] and notes its quadrant,
//   cordic_core      ITERS unrolled, pipelined CORDIC micro-rotations,
//   cordic_postproc  restores the signs for the real quadrant and rounds.
// The quadrant rides through the core as a sideband tag.
//
// Interface: in_valid/phase in, out_valid/cos_out/sin_out out. phase is an
// unsigned binary angle, 2**PHASE_W codes per full turn (0x4000 = pi/2 with
// PHASE_W = 16). cos_out and sin_out are signed with OUT_FRAC fraction bits
// (Q1.14 by default, 1.0 = 16384). There is no back-pressure.
// Timing: latency LATENCY = ITERS + 2 = 13 clocks from in_valid to the
// matching out_valid, one new angle accepted every clock (interval 1).
// rst_n is synchronous and active low and clears the valid pipeline only.
//
// The three-part structure, the unrolled and pipelined loop, the latency of
// 13 and the interval of 1 follow the described design; the angle encoding,
// the widths, the iteration count (chosen to give that latency) and the
// valid-only handshake are this design's choices.
module cordic_sincos
  import cordic_pkg::*;
#(
  parameter int PHASE_W  = 16,
  parameter int ITERS    = 11,
  parameter int Z_GUARD  = 2,
  parameter int FRAC     = 18,
  parameter int OUT_W    = 16,
  parameter int OUT_FRAC = 14
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [PHASE_W-1:0]      phase,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] cos_out,
  output logic signed [OUT_W-1:0] sin_out
);

  localparam int Z_W     = PHASE_W + Z_GUARD;
  localparam int XY_W    = FRAC + 2;  // sign, one integer bit, FRAC fraction bits

  logic                   pre_valid;
  logic signed [Z_W-1:0]  pre_z;
  quadrant_e              pre_quad;

  logic                   core_valid;
  logic signed [XY_W-1:0] core_cos, core_sin;
  logic [1:0]             core_tag;

  cordic_preproc #(
    .PHASE_W(PHASE_W),
    .Z_W    (Z_W)
  ) u_pre (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .phase    (phase),
    .out_valid(pre_valid),
    .z0       (pre_z),
    .quad     (pre_quad)
  );

  cordic_core #(
    .ITERS(ITERS),
    .XY_W (XY_W),
    .FRAC (FRAC),
    .Z_W  (Z_W),
    .TAG_W(2)
  ) u_core (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (pre_valid),
    .in_z     (pre_z),
    .in_tag   (pre_quad),
    .out_valid(core_valid),
    .out_cos  (core_cos),
    .out_sin  (core_sin),
    .out_tag  (core_tag)
  );

  cordic_postproc #(
    .XY_W    (XY_W),
    .FRAC    (FRAC),
    .OUT_W   (OUT_W),
    .OUT_FRAC(OUT_FRAC)
  ) u_post (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (core_valid),
    .in_cos   (core_cos),
    .in_sin   (core_sin),
    .quad     (quadrant_e'(core_tag)),
    .out_valid(out_valid),
    .cos_out  (cos_out),
    .sin_out  (sin_out)
  );

endmodule
