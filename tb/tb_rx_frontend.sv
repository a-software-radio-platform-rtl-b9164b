// tb_rx_frontend: the receive chain at reduced size (training M=32 chips,
// channel window Q=12 chips, prefix P=12, data field 128 chips, 2 users,
// 4 samples per chip, DFT length 128 with the in-band bins 11..53, which is
// the +-2.5 MHz band around fs/4 at fs = 15.36 MHz).
//
// The received burst is built here without the transmitter RTL: each user
// sends its cyclically shifted training (shift u*Q, with cyclic prefix) and
// QPSK data spread by a Walsh code, the chips are shaped by the root-raised
// cosine, moved to fs/4 by x'[n] = Re{j^(+-n) x[n]} and passed through a real
// two-path channel r[n] = A (x'[n-2] + 0.4 x'[n-6]), rounded to 12 bits.
// 1/(alpha_k L) is computed with real arithmetic and written as the host
// does. Runs: gain 16 with the '+' IF sign, gain 4 with the '-' sign and the
// inversion input set, gain 8, then a record-only burst whose read-out must
// equal the fed samples (odd samples negated when inverting).
// Checked: every decision of both users against the sent symbols, user and
// symbol index order, the symbol count, chest_done once per burst, and the
// exact record stream.
module tb_rx_frontend;
  import sr_pkg::*;
  localparam int M = 32, Q = 12, P = 12, D = 128, NS = 4, U = 2;
  localparam int KL = 11, KH = 53, NB = KH - KL + 1, L = M * NS;
  localparam int CAP = (P + M + D) * NS + Q * NS;
  localparam int NCH = P + M + D;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0, fs_tick = 1'b0, start = 1'b0;
  logic record_only = 1'b0, invert = 1'b0;
  logic signed [ADC_W-1:0] adc_in = '0;
  logic [SF_MAX-1:0] code [U];
  sf_e sf = SF16;
  logic ia_we = 1'b0;
  logic [$clog2(NB)-1:0] ia_addr = '0;
  logic signed [IA_W-1:0] ia_re = '0, ia_im = '0;
  logic busy, done, chest_done, sym_valid, rec_valid;
  logic [$clog2(U+1)-1:0] sym_user;
  logic [8:0] sym_idx;
  logic [1:0] sym_bits;
  logic signed [V_W-1:0] sym_y_re, sym_y_im;
  logic signed [31:0] sym_phase_err;
  logic signed [ADC_W-1:0] rec_data;

  logic bpsk = 1'b0;   // BPSK decisions are covered by tb_carrier_sync and tb_sdr_top
  rx_frontend #(.M_LEN(M), .Q_LEN(Q), .P_LEN(P), .D_CHIPS(D), .NSAMP(NS), .U(U),
                .K_LO(KL), .K_HI(KH), .DEPTH(1024)) dut (.*);

  always #5 clk = !clk;
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    fs_tick <= (cyc % 4 == 2);
  end

  int checks = 0, failures = 0;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] train [M];
  logic [1:0] data [U][D];
  logic signed [ADC_W-1:0] rx [CAP];

  task automatic make_training();
    real ar [M], ai [M];
    real mn, sr, si, mag, th;
    do begin
      for (int i = 0; i < M; i++) begin
        train[i] = 2'($urandom_range(0, 3));
        ar[i] = train[i][0] ? -1.0 : 1.0;
        ai[i] = train[i][1] ? -1.0 : 1.0;
      end
      mn = 1.0e9;
      for (int k = KL; k <= KH; k++) begin
        sr = 0.0; si = 0.0;
        for (int i = 0; i < M; i++) begin
          th = -2.0 * PI * real'((k % M) * i) / real'(M);
          sr += ar[i] * $cos(th) - ai[i] * $sin(th);
          si += ar[i] * $sin(th) + ai[i] * $cos(th);
        end
        mag = sr * sr + si * si;
        if (mag < mn) mn = mag;
      end
    end while (mn < 4.0);
    for (int k = KL; k <= KH; k++) begin
      sr = 0.0; si = 0.0;
      for (int i = 0; i < M; i++) begin
        th = -2.0 * PI * real'((k % M) * i) / real'(M);
        sr += ar[i] * $cos(th) - ai[i] * $sin(th);
        si += ar[i] * $sin(th) + ai[i] * $cos(th);
      end
      mag = sr * sr + si * si;
      @(negedge clk);
      ia_we = 1'b1; ia_addr = ($clog2(NB))'(k - KL);
      ia_re = IA_W'($rtoi(1073741824.0 * sr / (mag * real'(L))));
      ia_im = IA_W'($rtoi(-1073741824.0 * si / (mag * real'(L))));
    end
    @(negedge clk); ia_we = 1'b0;
  endtask

  // chip c of user u as +-1 components
  function automatic void chip(int u, int c, int n, output real cr, output real ci);
    logic [1:0] b;
    if (c < P + M) b = train[((c - P - u * Q) % M + 2 * M) % M];
    else b = data[u][(c - P - M) / n] ^ {2{code[u][(c - P - M) % n]}};
    cr = b[0] ? -1.0 : 1.0;
    ci = b[1] ? -1.0 : 1.0;
  endfunction

  task automatic make_burst(input int n, input bit minus);
    real xr [CAP + 8], xi [CAP + 8], xp [CAP + 8], cr, ci, v;
    for (int u = 0; u < U; u++)
      for (int j = 0; j < D / n; j++) data[u][j] = 2'($urandom_range(0, 3));
    for (int i = 0; i < CAP + 8; i++) begin xr[i] = 0.0; xi[i] = 0.0; end
    for (int u = 0; u < U; u++)
      for (int c = 0; c < NCH; c++) begin
        chip(u, c, n, cr, ci);
        for (int t = 0; t < RRC_TAPS; t++)
          if (c * NS + t < CAP + 8) begin
            xr[c * NS + t] += cr * real'(RRC_COEF[t]) / 4096.0;
            xi[c * NS + t] += ci * real'(RRC_COEF[t]) / 4096.0;
          end
      end
    // Re{j^n x} or Re{(-j)^n x}
    for (int i = 0; i < CAP + 8; i++)
      case (i % 4)
        0: xp[i] = xr[i];
        1: xp[i] = minus ? xi[i] : -xi[i];
        2: xp[i] = -xr[i];
        default: xp[i] = minus ? -xi[i] : xi[i];
      endcase
    for (int i = 0; i < CAP; i++) begin
      v = 0.0;
      if (i >= 2) v += xp[i - 2];
      if (i >= 6) v += 0.4 * xp[i - 6];
      rx[i] = ADC_W'($rtoi(v * 300.0 + (v >= 0.0 ? 0.5 : -0.5)));
    end
  endtask

  // A/D feed: sample 0 comes with start, then one per fs_tick
  int fidx = -1;
  always @(posedge clk) begin
    if (start) fidx <= 1;
    else if (fs_tick && fidx >= 1 && fidx < CAP) fidx <= fidx + 1;
  end
  always_comb adc_in = start ? rx[0] : (fidx >= 1 && fidx < CAP) ? rx[fidx] : '0;

  int nsym [U], exp_idx [U], n_chest = 0, n_rec = 0, cur_user = 0;
  always @(posedge clk) if (rst_n) begin
    if (chest_done) n_chest++;
    if (sym_valid) begin
      checks++;
      if (int'(sym_user) != cur_user && int'(sym_user) != cur_user + 1) failures++;
      cur_user = int'(sym_user);
      if (int'(sym_idx) != exp_idx[sym_user] || sym_bits !== data[sym_user][sym_idx]) begin
        failures++;
        if (failures < 8) $display("user %0d sym %0d (exp idx %0d) got %b sent %b", sym_user, sym_idx,
                                   exp_idx[sym_user], sym_bits, data[sym_user][sym_idx]);
      end
      exp_idx[sym_user]++;
      nsym[sym_user]++;
    end
    if (start) begin
      checks++;
      if (!fs_tick) failures++;
    end
    if (rec_valid) begin
      logic signed [ADC_W-1:0] e;
      e = (invert && n_rec % 2 == 1) ? -rx[n_rec] : rx[n_rec];
      checks++;
      if (rec_data !== e) begin
        failures++;
        if (failures < 8) $display("record %0d got %0d exp %0d", n_rec, rec_data, e);
      end
      n_rec++;
    end
  end

  task automatic run(input sf_e s, input bit minus, input bit rec);
    int n;
    n = sf_value(s);
    sf = s; invert = minus; record_only = rec;
    // Walsh codes of length n: all ones, and alternating
    code[0] = '0;
    code[1] = 16'haaaa;
    make_burst(n, minus);
    for (int u = 0; u < U; u++) begin nsym[u] = 0; exp_idx[u] = 0; end
    n_chest = 0; n_rec = 0; cur_user = 0;
    // start must be high in a cycle with fs_tick (ticks are 4 cycles apart)
    @(posedge clk iff fs_tick);
    repeat (4) @(negedge clk);
    start = 1'b1;
    @(negedge clk); start = 1'b0;
    wait (done);
    repeat (4) @(negedge clk);
    checks++;
    if (busy) failures++;
    if (rec) begin
      checks++;
      if (n_rec != CAP || n_chest != 0) begin
        failures++;
        $display("record: %0d samples, %0d estimates", n_rec, n_chest);
      end
    end else begin
      checks++;
      if (n_chest != 1 || nsym[0] != D / n || nsym[1] != D / n) begin
        failures++;
        $display("sf %0d: %0d estimates, %0d/%0d symbols", n, n_chest, nsym[0], nsym[1]);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    make_training();
    run(SF16, 1'b0, 1'b0);
    run(SF4, 1'b1, 1'b0);
    run(SF8, 1'b0, 1'b0);
    run(SF8, 1'b1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
