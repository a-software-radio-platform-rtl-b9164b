// tb_channel_estimator: small estimator (M=16 chips, 4 samples per chip,
// L=64, Q=4, 2 users, bins 6..26). A training sequence of random QPSK chips
// is spread to 4 samples per chip and circularly convolved with random
// complex channels g_u placed at offsets u*Q*4; the real part of the
// analytic pass-band result, j^n times that, is the window w (in the
// pass-band, as the receiver sees it). The host coefficients 1/(alpha L) and
// the expected estimate g = IDFT{band(DFT{w})/alpha} are computed here in
// real arithmetic, and every output must agree within 3 LSB + 2 %.
// The estimator runs with 5 lanes, so that both passes end with a partly
// filled group (21 bins, 32 output taps). The cycle count from start to done
// is checked against ceil(NB/5)*(L+1+5) + ceil(U*Q*4/5)*(NB+2+5).
module tb_channel_estimator;
  import sr_pkg::*;
  localparam int M = 16, NS = 4, Q = 4, U = 2, KLO = 6, KHI = 26;
  localparam int L = M * NS, NB = KHI - KLO + 1, QNC = Q * NS, NP = 5;
  localparam int CYC = (NB + NP - 1) / NP * (L + 1 + NP) + (U * QNC + NP - 1) / NP * (NB + 2 + NP);
  localparam real PI = 3.14159265358979;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ia_we = 1'b0;
  logic [$clog2(NB)-1:0] ia_addr = '0;
  logic signed [23:0] ia_re = '0, ia_im = '0;
  logic start = 1'b0;
  logic [9:0] base = 10'd5;
  logic busy, done, g_valid;
  logic [9:0] s_raddr;
  logic signed [11:0] s_rdata;
  logic [1:0] g_user;
  logic [$clog2(QNC)-1:0] g_idx;
  logic signed [15:0] g_re, g_im;
  int checks = 0, failures = 0, nout = 0;

  channel_estimator #(.NPAR(NP), .M_LEN(M), .Q_LEN(Q), .NSAMP(NS), .U(U), .K_LO(KLO), .K_HI(KHI),
                      .SW(12), .AW(10)) dut (.*);
  always #5 clk = !clk;

  logic signed [11:0] mem [1024];
  always_ff @(posedge clk) s_rdata <= mem[s_raddr];

  real ar [M], ai [M], wr [L];
  real iar [NB], iai [NB];
  real expr [U][QNC], expi [U][QNC];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (g_valid) begin
      real er, ei, tol;
      er = expr[g_user][g_idx]; ei = expi[g_user][g_idx];
      tol = 3.0 + 0.02 * $sqrt(er * er + ei * ei);
      checks++;
      nout++;
      if ((real'(g_re) - er) > tol || (er - real'(g_re)) > tol ||
          (real'(g_im) - ei) > tol || (ei - real'(g_im)) > tol) begin
        failures++;
        if (failures < 8) $display("u%0d d%0d got %0d,%0d exp %f,%f", g_user, g_idx, g_re, g_im, er, ei);
      end
    end
  end

  initial begin
    real gr [L], gi [L];
    real min_mag;
    longint t0;
    for (int i = 0; i < 1024; i++) mem[i] = '0;
    // a training sequence whose DFT has no small values, so that the
    // 24-bit coefficients 2**30/(alpha L) cannot overflow
    do begin
      min_mag = 1.0e9;
      for (int i = 0; i < M; i++) begin
        ar[i] = ($urandom_range(0, 1) != 0) ? 1.0 : -1.0;
        ai[i] = ($urandom_range(0, 1) != 0) ? 1.0 : -1.0;
      end
      for (int k = 0; k < M; k++) begin
        real sr, si, th;
        sr = 0.0; si = 0.0;
        for (int i = 0; i < M; i++) begin
          th = -2.0 * PI * real'(k * i) / real'(M);
          sr += ar[i] * $cos(th) - ai[i] * $sin(th);
          si += ar[i] * $sin(th) + ai[i] * $cos(th);
        end
        if (sr * sr + si * si < min_mag) min_mag = sr * sr + si * si;
      end
    end while (min_mag < 5.0);
    // channel of each user: a few random complex taps inside its window
    for (int n = 0; n < L; n++) begin gr[n] = 0.0; gi[n] = 0.0; end
    for (int u = 0; u < U; u++)
      for (int d = 1; d < 10; d++) begin
        gr[u * QNC + d] = real'($urandom_range(0, 400)) - 200.0;
        gi[u * QNC + d] = real'($urandom_range(0, 400)) - 200.0;
      end
    // w[n] = Re{ j^n sum_i a[i] g[(n - 4 i) mod L] }
    for (int n = 0; n < L; n++) begin
      real sr, si, cr, ci;
      sr = 0.0; si = 0.0;
      for (int i = 0; i < M; i++) begin
        int t;
        t = ((n - NS * i) % L + L) % L;
        sr += ar[i] * gr[t] - ai[i] * gi[t];
        si += ar[i] * gi[t] + ai[i] * gr[t];
      end
      case (n % 4)
        0: wr[n] = sr;
        1: wr[n] = -si;
        2: wr[n] = -sr;
        default: wr[n] = si;
      endcase
      if (wr[n] > 2047.0) wr[n] = 2047.0;
      if (wr[n] < -2048.0) wr[n] = -2048.0;
      mem[5 + n] = 12'($rtoi(wr[n] + (wr[n] >= 0 ? 0.5 : -0.5)));
      wr[n] = real'(mem[5 + n]);
    end
    // coefficients 1/(alpha L) * 2**30 and the reference estimate
    for (int k = KLO; k <= KHI; k++) begin
      real sr, si, mag, xr, xi;
      sr = 0.0; si = 0.0;
      for (int i = 0; i < M; i++) begin
        real th;
        th = -2.0 * PI * real'((k % M) * i) / real'(M);
        sr += ar[i] * $cos(th) - ai[i] * $sin(th);
        si += ar[i] * $sin(th) + ai[i] * $cos(th);
      end
      mag = sr * sr + si * si;
      iar[k - KLO] = real'($rtoi(1073741824.0 * sr / (mag * real'(L))));
      iai[k - KLO] = real'($rtoi(-1073741824.0 * si / (mag * real'(L))));
      @(negedge clk);
      ia_we = 1'b1; ia_addr = ($clog2(NB))'(k - KLO);
      ia_re = 24'($rtoi(iar[k - KLO])); ia_im = 24'($rtoi(iai[k - KLO]));
    end
    @(negedge clk); ia_we = 1'b0;
    for (int u = 0; u < U; u++)
      for (int d = 0; d < QNC; d++) begin
        real accr, acci;
        int n;
        n = u * QNC + d;
        accr = 0.0; acci = 0.0;
        for (int k = KLO; k <= KHI; k++) begin
          real xr, xi, gkr, gki, th;
          xr = 0.0; xi = 0.0;
          for (int m = 0; m < L; m++) begin
            th = -2.0 * PI * real'(k * m) / real'(L);
            xr += wr[m] * $cos(th);
            xi += wr[m] * $sin(th);
          end
          gkr = (xr * iar[k - KLO] - xi * iai[k - KLO]) / 1073741824.0;
          gki = (xr * iai[k - KLO] + xi * iar[k - KLO]) / 1073741824.0;
          th = 2.0 * PI * real'(k * n) / real'(L);
          accr += gkr * $cos(th) - gki * $sin(th);
          acci += gkr * $sin(th) + gki * $cos(th);
        end
        expr[u][d] = accr;
        expi[u][d] = acci;
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
      $display("cycles %0d expected %0d", ($time - t0) / 10, CYC);
    end
    repeat (2) @(negedge clk);
    checks++;
    if (nout != U * QNC) begin
      failures++;
      $display("%0d estimates, expected %0d", nout, U * QNC);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
