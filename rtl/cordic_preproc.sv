// cordic_preproc: angle preprocessing of the CORDIC sine/cosine unit.
//
// The CORDIC rotation only converges for angles near the first quadrant, so
// every input angle is mirrored into [0, pi/2] before the iterations, and its
// quadrant is passed on so that the post-processing can undo the mirror:
//   quadrant 1:  theta' = theta          quadrant 2:  theta' = pi - theta
//   quadrant 3:  theta' = theta - pi     quadrant 4:  theta' = 2*pi - theta
// With the angle given as a binary angle (2**PHASE_W codes per turn) the
// quadrant is the two top bits and the folding is one subtraction:
// theta' = r for quadrants 1 and 3, and 2**(PHASE_W-2) - r for quadrants 2
// and 4, where r is the angle less its two top bits.
//
// Interface: in_valid/phase in, out_valid/z0/quad out. z0 is the folded angle
// as a signed Z_W-bit binary angle (Z_W >= PHASE_W; the extra low bits are
// zero and give the angle accumulator guard bits). quad is the quadrant.
// Timing: one register stage, latency 1 clock, a new angle every clock.
// rst_n (synchronous, active low) clears out_valid only.
//
// Folding into the first quadrant and undoing it afterwards follow the
// described architecture; the binary-angle encoding, the widths and the
// single register stage are this design's choices.
module cordic_preproc
  import cordic_pkg::*;
#(
  parameter int PHASE_W = 16,
  parameter int Z_W     = 18
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [PHASE_W-1:0]        phase,
  output logic                      out_valid,
  output logic signed [Z_W-1:0]     z0,
  output quadrant_e                 quad
);

  localparam logic [PHASE_W-1:0] QUARTER = PHASE_W'(1) << (PHASE_W - 2);

  quadrant_e          q;
  logic [PHASE_W-1:0] r;
  logic [PHASE_W-1:0] folded;

  always_comb begin
    q      = quadrant_e'(phase[PHASE_W-1 -: 2]);
    r      = {2'b00, phase[PHASE_W-3:0]};
    // quadrants 2 and 4 are mirrored about their upper edge
    folded = phase[PHASE_W-2] ? (QUARTER - r) : r;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    z0   <= signed'(Z_W'(folded) << (Z_W - PHASE_W));
    quad <= q;
  end

endmodule
