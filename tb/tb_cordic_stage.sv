// tb_cordic_stage: self-checking test of one CORDIC micro-rotation.
//
// Two stages, shift 0 and shift 5, get the same random x, y and z. One clock
// later each output is compared with the rotation computed in the test:
// the shift as floor(v / 2**n) in real arithmetic, the angle constant as
// arctan(2**-n) scaled to a binary angle and rounded, the direction from the
// sign of z (non-negative z turns counterclockwise). The tag must pass
// unchanged.
module tb_cordic_stage;

  localparam int    XY_W   = 20;
  localparam int    Z_W    = 18;
  localparam int    TAG_W  = 2;
  localparam int    N_RAND = 2000;
  localparam real   PI     = 3.14159265358979323846;
  localparam int    SH [2] = '{0, 5};

  logic                   clk = 1'b0;
  logic                   rst_n = 1'b0;
  logic                   in_valid = 1'b0;
  logic signed [XY_W-1:0] in_x = '0, in_y = '0;
  logic signed [Z_W-1:0]  in_z = '0;
  logic [TAG_W-1:0]       in_tag = '0;
  logic                   out_valid [2];
  logic signed [XY_W-1:0] out_x [2];
  logic signed [XY_W-1:0] out_y [2];
  logic signed [Z_W-1:0]  out_z [2];
  logic [TAG_W-1:0]       out_tag [2];

  int checks = 0;
  int failures = 0;

  for (genvar k = 0; k < 2; k++) begin : g_dut
    cordic_stage #(.XY_W(XY_W), .Z_W(Z_W), .TAG_W(TAG_W), .SHIFT(SH[k])) dut (
      .clk, .rst_n, .in_valid, .in_x, .in_y, .in_z, .in_tag,
      .out_valid(out_valid[k]), .out_x(out_x[k]), .out_y(out_y[k]),
      .out_z(out_z[k]), .out_tag(out_tag[k])
    );
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N_RAND + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint shr(input longint v, input int n);
    return longint'($floor(real'(v) / (2.0 ** n)));
  endfunction

  task automatic apply(input longint x, input longint y, input longint z, input int tag);
    longint d, at, ex, ey, ez;
    in_valid <= 1'b1;
    in_x <= XY_W'(x);
    in_y <= XY_W'(y);
    in_z <= Z_W'(z);
    in_tag <= TAG_W'(tag);
    @(posedge clk);
    in_valid <= 1'b0;
    #1;
    d = (z >= 0) ? 1 : -1;
    for (int k = 0; k < 2; k++) begin
      at = longint'($atan(2.0 ** (-SH[k])) * (2.0 ** Z_W) / (2.0 * PI));
      ex = x - d * shr(y, SH[k]);
      ey = y + d * shr(x, SH[k]);
      ez = z - d * at;
      checks++;
      if (!out_valid[k] || longint'(out_x[k]) != ex || longint'(out_y[k]) != ey ||
          longint'(out_z[k]) != ez || int'(out_tag[k]) != tag) begin
        failures++;
        $display("FAIL shift %0d in (%0d,%0d,%0d): out (%0d,%0d,%0d) exp (%0d,%0d,%0d)",
                 SH[k], x, y, z, out_x[k], out_y[k], out_z[k], ex, ey, ez);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    apply(0, 0, 0, 1);
    apply(100000, 0, 1000, 2);
    apply(100000, -50000, -1000, 3);
    apply(-1, -1, -1, 0);
    for (int i = 0; i < N_RAND; i++) begin
      // magnitudes up to 2**18 and angles within +-pi/2 as in the real pipeline
      apply(longint'($urandom_range(0, 2 ** 19)) - 2 ** 18,
            longint'($urandom_range(0, 2 ** 19)) - 2 ** 18,
            longint'($urandom_range(0, 2 ** 17)) - 2 ** 16,
            int'($urandom_range(0, 3)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
