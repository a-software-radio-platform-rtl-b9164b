// tb_nb_decimator: random samples through the mode-2 path with decimation
// factors 1, 5 and 8; every output must be the block sum of (-j)^n r[n]
// over its dec samples, computed here.
module tb_nb_decimator;
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0, fs_tick = 1'b0;
  logic signed [11:0] r_in = '0;
  logic [7:0] dec = 8'd1;
  logic o_valid;
  logic signed [19:0] o_re, o_im;
  int checks = 0, failures = 0, nout = 0;
  nb_decimator #(.SW(12), .OW(20)) dut (.*);
  always #5 clk = !clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int er, ei, cnt, n;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 3; run++) begin
      enable = 1'b0;
      dec = (run == 0) ? 8'd1 : (run == 1) ? 8'd5 : 8'd8;
      @(negedge clk);
      enable = 1'b1;
      er = 0; ei = 0; cnt = 0; n = 0;
      for (int i = 0; i < 400; i++) begin
        @(negedge clk);
        r_in = 12'($urandom_range(0, 4000) - 2000);
        fs_tick = 1'b1;
        case (n % 4)
          0: er += int'(r_in);
          1: ei -= int'(r_in);
          2: er -= int'(r_in);
          default: ei += int'(r_in);
        endcase
        n++; cnt++;
        @(negedge clk);
        fs_tick = 1'b0;
        if (cnt == int'(dec)) begin
          checks++;
          if (!o_valid || o_re !== 20'(er) || o_im !== 20'(ei)) begin
            failures++;
            if (failures < 5) $display("dec %0d got %0d,%0d exp %0d,%0d", dec, o_re, o_im, er, ei);
          end
          er = 0; ei = 0; cnt = 0;
        end else begin
          checks++;
          if (o_valid) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
