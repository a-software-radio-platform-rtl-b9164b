// tb_if_upconverter: drives random complex samples on every other clock
// and checks x'[n] = Re{j^(+-n) x[n]} for both signs, against the value
// computed here from the sign pattern (Re, -Im, -Re, Im) or (Re, Im, -Re, -Im).
module tb_if_upconverter;
  logic clk = 1'b0, rst_n = 1'b0, fs_tick = 1'b0, minus_sign = 1'b0;
  logic signed [15:0] x_re = '0, x_im = '0, xp;
  logic xp_valid;
  int checks = 0, failures = 0;
  if_upconverter #(.W(16)) dut (.*);
  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, e;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    n = 0;
    for (int s = 0; s < 2; s++) begin
      minus_sign = s[0];
      for (int i = 0; i < 400; i++) begin
        @(negedge clk);
        x_re = 16'($urandom_range(0, 60000) - 30000);
        x_im = 16'($urandom_range(0, 60000) - 30000);
        fs_tick = 1'b1;
        case (n % 4)
          0: e = x_re;
          1: e = minus_sign ? x_im : -x_im;
          2: e = -x_re;
          default: e = minus_sign ? -x_im : x_im;
        endcase
        @(negedge clk);
        fs_tick = 1'b0;
        checks++;
        if (!xp_valid || xp !== 16'(e)) begin
          failures++;
          if (failures < 5) $display("n=%0d got %0d exp %0d", n, xp, e);
        end
        n++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
