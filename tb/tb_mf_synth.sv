// tb_mf_synth: random channel estimates for 2 users (Q=4 chips, 4 samples
// per chip) are streamed in; the filter of each user is then built for
// spreading gains 4, 8 and 16 with random codes and read back. Each tap must
// equal f[n] = sum_i s_i g[n - 4 i] computed here, and the build must take
// flen*N + 1 cycles from start to done.
module tb_mf_synth;
  import sr_pkg::*;
  localparam int Q = 4, NS = 4, U = 2, QNC = Q * NS;
  localparam int FMAX = (SF_MAX - 1) * NS + QNC, FA = $clog2(FMAX);
  logic clk = 1'b0, rst_n = 1'b0;
  logic g_valid = 1'b0;
  logic [1:0] g_user = '0;
  logic [$clog2(QNC)-1:0] g_idx = '0;
  logic signed [15:0] g_re = '0, g_im = '0;
  logic start = 1'b0;
  logic [1:0] user = '0;
  logic [15:0] code = '0;
  sf_e sf = SF4;
  logic busy, done;
  logic [FA:0] flen;
  logic [FA-1:0] f_raddr [1];
  logic signed [19:0] f_re [1];
  logic signed [19:0] f_im [1];
  int checks = 0, failures = 0;
  mf_synth #(.Q_LEN(Q), .NSAMP(NS), .U(U)) dut (.*);
  always #5 clk = !clk;

  int gr [U][QNC], gi [U][QNC];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, fl, er, ei, t0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    f_raddr[0] = '0;
    for (int u = 0; u < U; u++)
      for (int d = 0; d < QNC; d++) begin
        gr[u][d] = $urandom_range(0, 60000) - 30000;
        gi[u][d] = $urandom_range(0, 60000) - 30000;
        @(negedge clk);
        g_valid = 1'b1; g_user = 2'(u); g_idx = ($clog2(QNC))'(d);
        g_re = 16'(gr[u][d]); g_im = 16'(gi[u][d]);
      end
    @(negedge clk); g_valid = 1'b0;
    for (int run = 0; run < 6; run++) begin
      sf = sf_e'(run % 3);
      n = sf_value(sf);
      fl = (n - 1) * NS + QNC;
      user = 2'(run / 3);
      code = 16'($urandom);
      @(negedge clk); start = 1'b1;
      t0 = int'($time);
      @(negedge clk); start = 1'b0;
      wait (done);
      checks++;
      if ((int'($time) - t0) / 10 != fl * n + 1 - 1) begin
        failures++;
        $display("build took %0d cycles, expected %0d", (int'($time) - t0) / 10, fl * n);
      end
      checks++;
      if (int'(flen) != fl) failures++;
      @(negedge clk);
      for (int k = 0; k < fl; k++) begin
        f_raddr[0] = FA'(k);
        er = 0; ei = 0;
        for (int i = 0; i < n; i++)
          if (k - NS * i >= 0 && k - NS * i < QNC) begin
            er += code[i] ? -gr[user][k - NS * i] : gr[user][k - NS * i];
            ei += code[i] ? -gi[user][k - NS * i] : gi[user][k - NS * i];
          end
        @(negedge clk);
        checks++;
        if (f_re[0] !== 20'(er) || f_im[0] !== 20'(ei)) begin
          failures++;
          if (failures < 5) $display("sf %0d u %0d tap %0d got %0d,%0d exp %0d,%0d", n, user, k, f_re[0], f_im[0], er, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
