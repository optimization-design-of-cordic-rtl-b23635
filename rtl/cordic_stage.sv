// cordic_stage: one micro-rotation of the CORDIC iteration, registered.
//
// Stage SHIFT implements the rotation-mode step
//   d      = +1 if z >= 0, else -1
//   x_next = x - d * (y >>> SHIFT)
//   y_next = y + d * (x >>> SHIFT)
//   z_next = z - d * arctan(2**-SHIFT)
// so the multiplication by tan(theta_n) = 2**-n becomes an arithmetic shift,
// and z accumulates the angle still left to turn. The constant
// arctan(2**-SHIFT) is computed at elaboration from cordic_pkg::atan_code.
// A sideband tag travels with the data unchanged.
//
// Interface: in_valid/in_x/in_y/in_z/in_tag in, the same set out.
// Timing: latency 1 clock, a new input every clock. rst_n (synchronous,
// active low) clears out_valid only; the data registers are not reset.
//
// The update equations are the CORDIC equations of the described design; the
// choice d = +1 for z = 0, the arithmetic (flooring) shift and the widths are
// this design's own.
module cordic_stage
  import cordic_pkg::*;
#(
  parameter int XY_W  = 20,
  parameter int Z_W   = 18,
  parameter int TAG_W = 2,
  parameter int SHIFT = 0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [XY_W-1:0] in_x,
  input  logic signed [XY_W-1:0] in_y,
  input  logic signed [Z_W-1:0]  in_z,
  input  logic [TAG_W-1:0]       in_tag,
  output logic                   out_valid,
  output logic signed [XY_W-1:0] out_x,
  output logic signed [XY_W-1:0] out_y,
  output logic signed [Z_W-1:0]  out_z,
  output logic [TAG_W-1:0]       out_tag
);

  localparam logic signed [Z_W-1:0] ATAN = Z_W'(atan_code(SHIFT, Z_W));

  logic                   rotate_ccw;  // d = +1
  logic signed [XY_W-1:0] x_sh, y_sh;

  always_comb begin
    rotate_ccw = !in_z[Z_W-1];
    x_sh       = in_x >>> SHIFT;
    y_sh       = in_y >>> SHIFT;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    if (rotate_ccw) begin
      out_x <= in_x - y_sh;
      out_y <= in_y + x_sh;
      out_z <= in_z - ATAN;
    end else begin
      out_x <= in_x + y_sh;
      out_y <= in_y - x_sh;
      out_z <= in_z + ATAN;
    end
    out_tag <= in_tag;
  end

endmodule
