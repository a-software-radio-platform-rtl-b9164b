// tb_pulse_shaper: random complex chips (components -2..2) enter every
// fourth sample; each output sample must equal the direct convolution
// x[n] = sum_c a[c] h[n - 4c] computed here from the chip history and the
// package's pulse table, with one output per fs_tick.
module tb_pulse_shaper;
  import sr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, fs_tick = 1'b0, chip_load = 1'b0;
  logic signed [2:0] chip_re = '0, chip_im = '0;
  logic signed [15:0] x_re, x_im;
  logic x_valid;
  int checks = 0, failures = 0;
  pulse_shaper #(.CW(3), .W(16), .NSAMP(4)) dut (.*);
  always #5 clk = !clk;

  int ar [400], ai [400];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int er, ei;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1600; n++) begin
      @(negedge clk);
      fs_tick = 1'b1;
      chip_load = (n % 4 == 0);
      if (n % 4 == 0) begin
        ar[n / 4] = $urandom_range(0, 4) - 2;
        ai[n / 4] = $urandom_range(0, 4) - 2;
        chip_re = 3'(ar[n / 4]);
        chip_im = 3'(ai[n / 4]);
      end
      er = 0; ei = 0;
      for (int c = 0; c <= n / 4; c++) begin
        if (n - 4 * c >= 0 && n - 4 * c < RRC_TAPS) begin
          er += ar[c] * int'(RRC_COEF[n - 4 * c]);
          ei += ai[c] * int'(RRC_COEF[n - 4 * c]);
        end
      end
      if (er > 32767) er = 32767;
      if (er < -32768) er = -32768;
      if (ei > 32767) ei = 32767;
      if (ei < -32768) ei = -32768;
      @(negedge clk);
      fs_tick = 1'b0; chip_load = 1'b0;
      checks++;
      if (!x_valid || x_re !== 16'(er) || x_im !== 16'(ei)) begin
        failures++;
        if (failures < 5) $display("n=%0d got %0d,%0d exp %0d,%0d", n, x_re, x_im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
