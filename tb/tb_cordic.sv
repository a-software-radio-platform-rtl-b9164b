// tb_cordic: checks the CORDIC against real-valued cos/sin/atan2.
// Rotation: unit vectors (2**14) turned by random angles must match
// 16384 (cos, sin) within 8 LSB. Vectoring: random vectors must give
// atan2 within 2**-13 turn... of the exact angle and the magnitude within 0.1 %.
module tb_cordic;
  localparam int W = 24;
  logic vectoring;
  logic signed [W-1:0] x_in, y_in, x_out, y_out;
  logic [31:0] z_in, z_out;
  int checks = 0, failures = 0;

  cordic #(.W(W), .ITER(16)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real th, ex, ey, err, mag;
    for (int t = 0; t < 2000; t++) begin
      vectoring = 1'b0;
      x_in = 24'sd16384; y_in = '0;
      z_in = $urandom;
      #1;
      th = real'(z_in) / 4294967296.0 * 2.0 * 3.14159265358979;
      ex = 16384.0 * $cos(th); ey = 16384.0 * $sin(th);
      checks++;
      if ((real'(x_out) - ex) > 8.0 || (ex - real'(x_out)) > 8.0 ||
          (real'(y_out) - ey) > 8.0 || (ey - real'(y_out)) > 8.0) begin
        failures++;
        if (failures < 10) $display("rot z=%h got %0d %0d exp %f %f", z_in, x_out, y_out, ex, ey);
      end
      vectoring = 1'b1;
      x_in = W'($signed($urandom_range(0, 200000)) - 100000);
      y_in = W'($signed($urandom_range(0, 200000)) - 100000);
      z_in = 32'd0;
      #1;
      th = $atan2(real'(y_in), real'(x_in)) / (2.0 * 3.14159265358979) * 4294967296.0;
      err = real'($signed(z_out)) - th;
      if (err > 2147483648.0) err -= 4294967296.0;
      if (err < -2147483648.0) err += 4294967296.0;
      mag = $sqrt(real'(x_in) * real'(x_in) + real'(y_in) * real'(y_in));
      checks++;
      if (err > 524288.0 || err < -524288.0 || (real'(x_out) - mag) > 0.001 * mag + 4 || (mag - real'(x_out)) > 0.001 * mag + 4) begin
        failures++;
        if (failures < 10) $display("vec %0d %0d got z=%0d mag %0d exp %f %f", x_in, y_in, $signed(z_out), x_out, th, mag);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
