// tb_cordic_preproc: self-checking test of the angle folding stage.
//
// Drives the four quadrant boundaries, the codes next to them and random
// angles, one per clock, and checks one clock later that the folded angle
// and the quadrant match a reference worked out in real arithmetic: the
// angle in radians is mirrored into [0, pi/2] with the trigonometric
// identities and converted back to a binary angle of Z_W bits.
module tb_cordic_preproc;
  import cordic_pkg::*;

  localparam int PHASE_W = 16;
  localparam int Z_W     = 18;
  localparam int N_RAND  = 2000;

  logic                  clk = 1'b0;
  logic                  rst_n = 1'b0;
  logic                  in_valid = 1'b0;
  logic [PHASE_W-1:0]    phase = '0;
  logic                  out_valid;
  logic signed [Z_W-1:0] z0;
  quadrant_e             quad;

  int checks = 0;
  int failures = 0;

  cordic_preproc #(.PHASE_W(PHASE_W), .Z_W(Z_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N_RAND + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: fold in radians, then express as a Z_W-bit binary angle.
  function automatic void expect_fold(input logic [PHASE_W-1:0] p,
                                      output longint z_exp, output int q_exp);
    real th, f;
    th = real'(p) * 2.0 * PI / (2.0 ** PHASE_W);
    q_exp = int'(p) / (2 ** (PHASE_W - 2));
    case (q_exp)
      0: f = th;
      1: f = PI - th;
      2: f = th - PI;
      default: f = 2.0 * PI - th;
    endcase
    z_exp = longint'(f / (2.0 * PI) * (2.0 ** Z_W));
  endfunction

  task automatic apply(input logic [PHASE_W-1:0] p);
    longint z_exp;
    int     q_exp;
    in_valid <= 1'b1;
    phase    <= p;
    @(posedge clk);
    in_valid <= 1'b0;
    expect_fold(p, z_exp, q_exp);
    #1;
    checks++;
    if (!out_valid || longint'(z0) != z_exp || int'(quad) != q_exp) begin
      failures++;
      $display("FAIL phase=%h: valid=%b z0=%0d (exp %0d) quad=%0d (exp %0d)",
               p, out_valid, z0, z_exp, quad, q_exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1;
    checks++;
    if (out_valid) begin
      failures++;
      $display("FAIL out_valid set without input");
    end
    for (int b = 0; b < 4; b++) begin
      apply(PHASE_W'(b * (2 ** (PHASE_W - 2))));
      apply(PHASE_W'(b * (2 ** (PHASE_W - 2)) + 1));
      apply(PHASE_W'(b * (2 ** (PHASE_W - 2)) - 1));
    end
    for (int i = 0; i < N_RAND; i++) apply(PHASE_W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
