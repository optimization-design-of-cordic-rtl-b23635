// cordic_core: the calculation part of the CORDIC sine/cosine unit, with the
// iteration loop fully unrolled and pipelined.
//
// ITERS copies of cordic_stage are chained, stage n shifting by n, so one
// angle enters and one result leaves every clock. The vector starts at
// x0 = 1/K_N, y0 = 0, where K_N = prod sqrt(1 + 2**(-2n)) is the fixed gain of
// N = ITERS micro-rotations; after the last stage x = cos(z0) and
// y = sin(z0) without a correcting multiplication, and z has been driven
// towards zero. The residual angle is at most arctan(2**-(ITERS-1)).
//
// Interface: in_valid/in_z/in_tag in; out_valid/out_cos/out_sin/out_tag out.
// in_z is a signed Z_W-bit binary angle (2**Z_W codes per turn) in
// [-pi/2, pi/2]; out_cos and out_sin are signed XY_W-bit values with FRAC
// fraction bits. in_tag is carried alongside unchanged.
// Timing: latency ITERS clocks, initiation interval 1. rst_n (synchronous,
// active low) clears the valid flags only.
//
// The iteration, the initial value 1/K and the unrolled pipeline follow the
// described design. ITERS = 11 is chosen so that the whole unit, with one
// register before and one after this core, has a latency of 13 clocks; the
// widths are this design's choices.
module cordic_core
  import cordic_pkg::*;
#(
  parameter int ITERS = 11,
  parameter int XY_W  = 20,
  parameter int FRAC  = 18,
  parameter int Z_W   = 18,
  parameter int TAG_W = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [Z_W-1:0]  in_z,
  input  logic [TAG_W-1:0]       in_tag,
  output logic                   out_valid,
  output logic signed [XY_W-1:0] out_cos,
  output logic signed [XY_W-1:0] out_sin,
  output logic [TAG_W-1:0]       out_tag
);

  localparam logic signed [XY_W-1:0] X0 = XY_W'(inv_gain_code(ITERS, FRAC));
  localparam logic signed [Z_W-1:0]  QUARTER = Z_W'(1) <<< (Z_W - 2);  // pi/2

  // The rotation converges only for angles within about +-99.9 degrees; the
  // folding in front of this core keeps every angle in [-pi/2, pi/2].
  a_angle_in_range : assert property (
    @(posedge clk) disable iff (!rst_n)
      in_valid |-> (in_z <= QUARTER) && (in_z >= -QUARTER)
  ) else $error("cordic_core: angle %0d outside [-pi/2, pi/2]", in_z);

  // Pipeline state between stages; index 0 is the input of stage 0.
  logic                   v   [ITERS+1];
  logic signed [XY_W-1:0] x   [ITERS+1];
  logic signed [XY_W-1:0] y   [ITERS+1];
  logic signed [Z_W-1:0]  z   [ITERS+1];
  logic [TAG_W-1:0]       tag [ITERS+1];

  assign v[0]   = in_valid;
  assign x[0]   = X0;
  assign y[0]   = '0;
  assign z[0]   = in_z;
  assign tag[0] = in_tag;

  for (genvar n = 0; n < ITERS; n++) begin : g_stage
    cordic_stage #(
      .XY_W (XY_W),
      .Z_W  (Z_W),
      .TAG_W(TAG_W),
      .SHIFT(n)
    ) u_stage (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (v[n]),
      .in_x     (x[n]),
      .in_y     (y[n]),
      .in_z     (z[n]),
      .in_tag   (tag[n]),
      .out_valid(v[n+1]),
      .out_x    (x[n+1]),
      .out_y    (y[n+1]),
      .out_z    (z[n+1]),
      .out_tag  (tag[n+1])
    );
  end

  assign out_valid = v[ITERS];
  assign out_cos   = x[ITERS];
  assign out_sin   = y[ITERS];
  assign out_tag   = tag[ITERS];

endmodule
