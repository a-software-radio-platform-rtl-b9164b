// cordic: combinational CORDIC, rotation and vectoring modes.
//
// Rotation mode (vectoring = 0) turns the vector (x_in, y_in) by the angle
// z_in and removes the CORDIC gain, so x_out + j y_out = (x_in + j y_in) e^{j z_in}.
// Vectoring mode (vectoring = 1) turns the vector onto the positive x axis:
// z_out = z_in + atan2(y_in, x_in) and x_out = |x_in + j y_in| (gain removed).
// Angles are unsigned fractions of a turn: 2**32 is 2*pi.
// A first step brings the vector into the right half plane (rotation by pi),
// then ITER micro-rotations by atan(2**-i) follow. The module has no clock;
// the caller registers around it. The transceiver uses it to make the DFT
// twiddle factors of the channel estimator and to derotate and measure the
// phase of symbols in the carrier synchroniser; the algorithm itself is this
// design's choice.
module cordic #(
  parameter int W    = 24,   // input/output component width
  parameter int ITER = 16    // micro-rotations (<= 20)
) (
  input  logic                vectoring,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  input  logic        [31:0]  z_in,
  output logic signed [W-1:0] x_out,
  output logic signed [W-1:0] y_out,
  output logic        [31:0]  z_out
);
  localparam int IW = W + 3;   // internal width: gain growth and sign
  localparam logic [31:0] ATAN [20] = '{
    32'd536870912, 32'd316933406, 32'd167458907, 32'd85004756, 32'd42667331,
    32'd21354465, 32'd10679838, 32'd5340245, 32'd2670163, 32'd1335087,
    32'd667544, 32'd333772, 32'd166886, 32'd83443, 32'd41722, 32'd20861,
    32'd10430, 32'd5215, 32'd2608, 32'd1304 };
  // 1/An = 0.607253 in Q16
  localparam logic signed [17:0] KINV = 18'sd39797;

  logic signed [IW-1:0] x, y, xn, yn;
  logic        [31:0]   z;
  logic                 dir;   // 1: counter-clockwise micro-rotation
  logic signed [IW+17:0] xs, ys;

  always_comb begin
    x = IW'(x_in);
    y = IW'(y_in);
    z = z_in;
    // bring the start vector into the convergence range
    if (vectoring) begin
      if (x_in < 0) begin
        x = -x; y = -y; z = z + 32'h8000_0000;
      end
    end else if (z_in[31] != z_in[30]) begin
      x = -x; y = -y; z = z + 32'h8000_0000;
    end
    for (int i = 0; i < ITER; i++) begin
      if (vectoring) dir = y < 0;
      else           dir = !z[31];
      if (dir) begin
        xn = x - (y >>> i);
        yn = y + (x >>> i);
        z  = z - ATAN[i];
      end else begin
        xn = x + (y >>> i);
        yn = y - (x >>> i);
        z  = z + ATAN[i];
      end
      x = xn;
      y = yn;
    end
    z_out = z;
    xs = (x * KINV) >>> 16;
    ys = (y * KINV) >>> 16;
    x_out = W'(xs);
    y_out = W'(ys);
  end
endmodule
