// tb_carrier_sync: QPSK symbols of amplitude 2**16 with a carrier phase
// that starts at 0.2 rad and drifts by 0.01 rad per symbol, as left by a
// small frequency offset. All 300 decisions must be correct (an untracked
// phase would pass pi/4 after about 60 symbols), the first output must be the
// unrotated input, and after 100 symbols the loop must sit at the lag a
// first-order loop has on a phase ramp: 0.01 rad * 2**MU_SH = 0.08 rad,
// within 0.01 rad. A second burst after clear checks the reset of the phase,
// and a third one repeats the test with BPSK symbols on the diagonal.
module tb_carrier_sync;
  import sr_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, v_valid = 1'b0, bpsk = 1'b0;
  logic signed [V_W-1:0] v_re = '0, v_im = '0, y_re, y_im;
  logic d_valid;
  logic [1:0] d_bits;
  logic signed [31:0] phase_err;
  logic [31:0] phase;
  int checks = 0, failures = 0;
  carrier_sync #(.MU_SH(3)) dut (.*);
  always #5 clk = !clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real th, dr, di, er;
    logic [1:0] b;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 3; run++) begin
      bpsk = (run == 2);
      @(negedge clk); clear = 1'b1;
      @(negedge clk); clear = 1'b0;
      for (int j = 0; j < 300; j++) begin
        b = 2'($urandom_range(0, 3));
        if (bpsk) b = {2{b[0]}};
        dr = b[0] ? -1.0 : 1.0;
        di = b[1] ? -1.0 : 1.0;
        th = 0.2 + 0.01 * real'(j);
        @(negedge clk);
        v_valid = 1'b1;
        v_re = V_W'($rtoi(65536.0 * (dr * $cos(th) - di * $sin(th))));
        v_im = V_W'($rtoi(65536.0 * (dr * $sin(th) + di * $cos(th))));
        @(negedge clk);
        v_valid = 1'b0;
        checks++;
        if (!d_valid || d_bits !== b) begin
          failures++;
          if (failures < 5) $display("run %0d sym %0d got %b sent %b", run, j, d_bits, b);
        end
        if (j == 0) begin
          checks++;
          if (y_re - v_re > 4 || v_re - y_re > 4 || y_im - v_im > 4 || v_im - y_im > 4) failures++;
        end
        if (j > 100) begin
          er = real'(phase_err) / 4294967296.0 * 2.0 * PI;
          checks++;
          if (er > 0.09 || er < 0.07) begin
            failures++;
            if (failures < 5) $display("sym %0d phase error %f rad", j, er);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
