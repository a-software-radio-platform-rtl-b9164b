// tb_burst_builder: small burst (M=8, Q=2, prefix 3, 32 data chips, 2 users)
// with random training, data and codes, for spreading gains 4, 8 and 16, and
// once more at gain 4 with BPSK data (bit 0 of each symbol on both rails).
// Every chip is compared with the sum over users of the rule computed here:
// training chip a[(c - P - uQ) mod M], then data chip b[k/N] * s[k mod N];
// after the burst the output must return to zero and busy must fall.
module tb_burst_builder;
  import sr_pkg::*;
  localparam int M = 8, Q = 2, P = 3, D = 32, U = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic train_we = 1'b0, sym_we = 1'b0;
  logic [9:0] train_addr = '0;
  logic [1:0] train_data = '0, sym_data = '0;
  logic [0:0] sym_user = '0;
  logic [7:0] sym_addr = '0;
  logic [15:0] code [U];
  logic [U-1:0] user_en = '1;
  sf_e sf = SF4;
  logic chip_en = 1'b0, start = 1'b0, busy, bpsk = 1'b0;
  logic signed [2:0] chip_re, chip_im;
  int checks = 0, failures = 0;
  burst_builder #(.U(U), .M_LEN(M), .Q_LEN(Q), .P_LEN(P), .D_CHIPS(D), .CW(3)) dut (.*);
  always #5 clk = !clk;

  logic [1:0] tr [M];
  logic [1:0] sy [U][32];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sgn(logic b);
    return b ? -1 : 1;
  endfunction

  initial begin
    int er, ei, n;
    logic [1:0] b;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < M; i++) begin
      tr[i] = 2'($urandom_range(0, 3));
      @(negedge clk); train_we = 1'b1; train_addr = 10'(i); train_data = tr[i];
    end
    for (int u = 0; u < U; u++)
      for (int j = 0; j < 32; j++) begin
        sy[u][j] = 2'($urandom_range(0, 3));
        @(negedge clk); train_we = 1'b0; sym_we = 1'b1; sym_user = 1'(u); sym_addr = 8'(j); sym_data = sy[u][j];
      end
    @(negedge clk); sym_we = 1'b0;
    for (int run = 0; run < 4; run++) begin
      sf = sf_e'(run % 3);
      bpsk = (run == 3);
      n = sf_value(sf);
      code[0] = 16'($urandom);
      code[1] = 16'($urandom);
      @(negedge clk); chip_en = 1'b1; start = 1'b1;
      @(negedge clk); chip_en = 1'b0; start = 1'b0;
      for (int c = 0; c < P + M + D; c++) begin
        @(negedge clk); chip_en = 1'b1;
        er = 0; ei = 0;
        for (int u = 0; u < U; u++) begin
          if (c < P + M) b = tr[((c - P - u * Q) % M + 2 * M) % M];
          else begin
            b = sy[u][(c - P - M) / n];
            if (bpsk) b = {2{b[0]}};
            b = b ^ {2{code[u][(c - P - M) % n]}};
          end
          er += sgn(b[0]); ei += sgn(b[1]);
        end
        @(negedge clk); chip_en = 1'b0;
        checks++;
        if (chip_re !== 3'(er) || chip_im !== 3'(ei)) begin
          failures++;
          if (failures < 5) $display("sf %0d chip %0d got %0d,%0d exp %0d,%0d", n, c, chip_re, chip_im, er, ei);
        end
      end
      checks++;
      if (busy) failures++;
      @(negedge clk); chip_en = 1'b1;
      @(negedge clk); chip_en = 1'b0;
      checks++;
      if (chip_re != 0 || chip_im != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
