// tb_matched_filter: random real samples and a random complex filter of
// 40 taps; 13 symbols from k0 = 20 with stride 16, computed 3 at a time (the
// last group holds one symbol). Each output must be
// (sum_m r[k0 + 16 j + m] conj(f[m])) >> 8 computed here, the outputs must
// come in symbol order, and the run must take
// ceil(13/3) * (flen + 2*16 + 1 + 3) cycles from start to done.
module tb_matched_filter;
  import sr_pkg::*;
  localparam int FL = 40, NSYM = 13, K0 = 20, STR = 16, NP = 3;
  localparam int CYC = (NSYM + NP - 1) / NP * (FL + (NP - 1) * STR + 1 + NP);
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [12:0] k0 = 13'(K0), stride = 13'(STR);
  logic [8:0] nsym = 9'(NSYM);
  logic [9:0] flen = 10'(FL);
  logic busy, done, v_valid;
  logic [12:0] s_raddr;
  logic signed [11:0] s_rdata;
  logic [8:0] f_raddr [NP];
  logic signed [19:0] f_re [NP];
  logic signed [19:0] f_im [NP];
  logic [8:0] v_idx;
  logic signed [V_W-1:0] v_re, v_im;
  int checks = 0, failures = 0, nv = 0;
  matched_filter #(.AW(13), .FA(9), .SW(12), .VSH(8), .NSP(NP)) dut (.*);
  always #5 clk = !clk;

  logic signed [11:0] smem [512];
  logic signed [19:0] fr [512], fi [512];
  always_ff @(posedge clk) begin
    s_rdata <= smem[s_raddr[8:0]];
    for (int p = 0; p < NP; p++) begin
      f_re[p] <= fr[f_raddr[p]];
      f_im[p] <= fi[f_raddr[p]];
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (v_valid) begin
    longint er, ei;
    er = 0; ei = 0;
    for (int m = 0; m < FL; m++) begin
      er += longint'(smem[K0 + STR * int'(v_idx) + m]) * longint'(fr[m]);
      ei -= longint'(smem[K0 + STR * int'(v_idx) + m]) * longint'(fi[m]);
    end
    er = er >>> 8; ei = ei >>> 8;
    checks++;
    if (int'(v_idx) != nv || longint'(v_re) != er || longint'(v_im) != ei) begin
      failures++;
      if (failures < 5) $display("sym %0d got %0d,%0d exp %0d,%0d", v_idx, v_re, v_im, er, ei);
    end
    nv++;
  end

  initial begin
    longint t0;
    for (int i = 0; i < 512; i++) begin
      smem[i] = 12'($urandom_range(0, 4000) - 2000);
      fr[i] = 20'($urandom_range(0, 200000) - 100000);
      fi[i] = 20'($urandom_range(0, 200000) - 100000);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); start = 1'b1;
    t0 = $time;
    @(negedge clk); start = 1'b0;
    wait (done);
    checks++;
    if (($time - t0) / 10 != CYC) begin
      failures++;
      $display("run took %0d cycles, expected %0d", ($time - t0) / 10, CYC);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (nv != NSYM || busy) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
