// tb_sdr_top: end-to-end test of the transceiver at its default sizes.
//
// The host side is modelled by tasks that write the configuration: a random
// QPSK training sequence, the in-band coefficients 1/(alpha_k L) computed
// here with real arithmetic, two orthogonal Walsh codes and random data.
// The converter/radio side is a digital loop-back: every D/A code group of
// a transmit slot is checked against the ternary tap pattern and the
// recovered fs-rate IF samples are stored; in the next receive slot they are
// fed back to the A/D port through a two-path real channel
// r[n] = (2 x'[n-3] + x'[n-8]) / 32. The decisions sent to the host must equal
// the transmitted symbols of both users.
// Runs: (1) mode 1 with spreading gain 16 and the '+' IF sign,
// (2) mode 1 with gain 8 and the '-' sign, (3) gain 4, (3b) BPSK data at
// gain 8, whose decisions must repeat bit 0 of the symbol written, (4) mode 3 record and
// read-out, (5) mode 4 raw stream, (6) mode 2 narrowband decimation.
// At every gain the burst of the following receive slot is decoded as well
// and must start exactly one slot pair later (the receiver keeps up in real
// time). Each mechanism is counted and must have happened at least once.
module tb_sdr_top;
  import sr_pkg::*;

  localparam int L     = DFT_L;
  localparam int NB    = BIN_HI - BIN_LO + 1;
  localparam int CAP   = (P_PREFIX + M_TRAIN + DATA_CHIPS) * NC + Q_CHAN * NC;
  localparam int SLOTS = SLOT_CHIPS * NC;   // samples per slot

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  logic cfg_we = 1'b0;
  logic [15:0] cfg_addr = '0;
  logic [63:0] cfg_wdata = '0;
  logic signed [X_W-1:0]   dac_out;
  logic signed [ADC_W-1:0] adc_in;
  logic fs_tick, tx_slot, rx_slot, rx_busy, chest_done, host_valid;
  logic [31:0] host_data;

  sdr_top dut (.*);

  always #4 clk = !clk;

  int checks = 0, failures = 0;
  int n_bursts = 0, n_neg_tap = 0, n_zero_tap = 0, n_chest = 0, n_sym = 0, n_phase_corr = 0;
  int n_bpsk = 0, n_realtime = 0, n_soft = 0, n_sf_switch = 0, n_minus = 0, n_record = 0, n_stream = 0, n_narrow = 0, n_slot_switch = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- configuration ----------------
  logic [1:0]  train [M_TRAIN];
  logic [1:0]  data  [U_MAX][256];
  logic [15:0] codes [U_MAX];
  tern_t       taps  [L_DA];
  int          sf_n;

  task automatic wr(input logic [15:0] a, input logic [63:0] d);
    @(negedge clk);
    cfg_we = 1'b1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic write_ctrl(input int mode, input sf_e sf, input bit minus, input bit bpsk = 1'b0);
    wr(CFG_CTRL, 64'(mode) | (64'(sf) << 3) | (64'(minus) << 5) | (64'd1 << 6) | (64'd1 << 7) | (64'(minus) << 8)
                 | (64'(bpsk) << 9));
  endtask

  task automatic setup_training();
    real ar [M_TRAIN], ai [M_TRAIN];
    real min_mag;
    do begin
      for (int i = 0; i < M_TRAIN; i++) begin
        train[i] = 2'($urandom_range(0, 3));
        ar[i] = train[i][0] ? -1.0 : 1.0;
        ai[i] = train[i][1] ? -1.0 : 1.0;
      end
      min_mag = 1.0e9;
      for (int k = BIN_LO; k <= BIN_HI; k++) begin
        real sr, si, mag;
        sr = 0.0; si = 0.0;
        for (int i = 0; i < M_TRAIN; i++) begin
          real th;
          th = -2.0 * 3.14159265358979 * real'((k % M_TRAIN) * i) / real'(M_TRAIN);
          sr += ar[i] * $cos(th) - ai[i] * $sin(th);
          si += ar[i] * $sin(th) + ai[i] * $cos(th);
        end
        mag = sr * sr + si * si;
        if (mag < min_mag) min_mag = mag;
        // 1/(alpha L) scaled by 2**30
        begin
          longint ir, ii;
          ir = longint'($rtoi(1073741824.0 * sr / (mag * real'(L))));
          ii = longint'($rtoi(-1073741824.0 * si / (mag * real'(L))));
          wr(CFG_INVA0 + 16'(k - BIN_LO), {8'b0, ii[23:0], 8'b0, ir[23:0]});
        end
      end
    end while (min_mag < 4.0);
    for (int i = 0; i < M_TRAIN; i++) wr(CFG_TRAIN0 + 16'(i), 64'(train[i]));
  endtask

  task automatic setup_data(input bit bpsk);
    for (int u = 0; u < U_MAX; u++)
      for (int j = 0; j < 256; j++) begin
        data[u][j] = 2'($urandom_range(0, 3));
        wr(CFG_DATA0 + 16'(u * 256 + j), 64'(data[u][j]));
        // BPSK sends bit 0 on both rails and decides both bits alike
        if (bpsk) data[u][j] = {2{data[u][j][0]}};
      end
  endtask

  // ---------------- loop-back: record the transmit slot ----------------
  logic signed [X_W-1:0] txs [SLOTS];
  int tx_n = 0, grp = -1;
  logic signed [X_W-1:0] grp_x;
  always @(posedge clk) begin
    if (!enable) begin
      tx_n <= 0; grp <= -1;
    end else begin
      if (grp >= 0) begin
        // code m of the group must be taps[m] * x'
        logic signed [X_W-1:0] exp_c;
        exp_c = (taps[grp] == 2'b01) ? grp_x : (taps[grp] == 2'b11) ? -grp_x : '0;
        checks++;
        if (dac_out !== exp_c) begin
          failures++;
          if (failures < 10) $display("DAC mismatch phase %0d: %0d vs %0d", grp, dac_out, exp_c);
        end
        if (grp_x != 0 && taps[grp] == 2'b11) n_neg_tap++;
        if (grp_x != 0 && taps[grp] == 2'b00) n_zero_tap++;
        grp <= (grp == L_DA - 1) ? -1 : grp + 1;
      end
      if (dut.xp_valid) begin
        grp   <= 0;
        grp_x <= dut.xp;
        if (dut.tx_slot) begin
          if (tx_n < SLOTS) txs[tx_n] <= dut.xp;
          tx_n <= tx_n + 1;
        end
      end
      if (dut.slot_start && dut.tx_slot) tx_n <= 0;
    end
  end

  // ---------------- loop-back: feed the receive slot ----------------
  int rx_n = 0;
  logic signed [ADC_W-1:0] fed [SLOTS];
  function automatic logic signed [ADC_W-1:0] chan(int n);
    int v;
    v = 0;
    if (n >= 3 && n - 3 < SLOTS) v += 2 * int'(txs[n - 3]);
    if (n >= 8 && n - 8 < SLOTS) v += int'(txs[n - 8]);
    return ADC_W'(v / 32);
  endfunction
  int rx_idx;
  assign rx_idx = dut.slot_start ? 0 : rx_n;
  assign adc_in = (rx_slot && rx_idx < SLOTS) ? chan(rx_idx) : '0;
  always @(posedge clk) begin
    if (!enable) rx_n <= 0;
    else if (fs_tick && rx_slot && rx_idx < SLOTS) begin
      fed[rx_idx] <= adc_in;
      rx_n <= rx_idx + 1;
    end else if (dut.slot_start) rx_n <= 0;
  end

  // ---------------- timing and mechanism counters ----------------
  int last_fs = -1;
  logic prev_tx = 1'b0;
  always @(posedge clk) begin
    if (fs_tick) begin
      if (last_fs >= 0 && int'(cyc) - last_fs != L_DA) begin
        failures++;
        $display("fs tick spacing %0d", int'(cyc) - last_fs);
      end
      last_fs <= int'(cyc);
    end
    if (!enable) last_fs <= -1;
    prev_tx <= tx_slot;
    if (enable && prev_tx && !tx_slot) n_slot_switch++;
    if (chest_done) n_chest++;
    if (dut.u_bb.start && dut.u_bb.chip_en) n_bursts++;
    if (dut.sym_valid && dut.sym_perr != 0) n_phase_corr++;
  end

  // ---------------- host stream collection ----------------
  logic [1:0] got   [U_MAX][256];
  int         got_n [U_MAX];
  logic signed [31:0] hstream [$];
  // mode 1 sends a header word and then the soft value of each symbol
  bit soft_next = 1'b0;
  logic [1:0] last_bits;
  always @(posedge clk) begin
    if (host_valid) begin
      if (dut.mode_q == MODE_PREDETECT && soft_next) begin
        // the soft value's signs must be the decision
        soft_next = 1'b0;
        checks++;
        if ({host_data[31], host_data[15]} !== last_bits) begin
          failures++;
          if (failures < 10) $display("soft word %h does not match bits %b", host_data, last_bits);
        end else n_soft++;
      end else if (host_data[31:28] == 4'h1 && dut.mode_q == MODE_PREDETECT) begin
        got[host_data[24]][host_data[23:16]] <= host_data[1:0];
        got_n[host_data[24]] <= got_n[host_data[24]] + 1;
        soft_next = 1'b1;
        last_bits = host_data[1:0];
      end else begin
        hstream.push_back(host_data);
      end
    end
  end

  // ---------------- runs ----------------
  task automatic check_decisions(input int nsym);
    for (int u = 0; u < U_MAX; u++) begin
      int errs;
      errs = 0;
      checks++;
      if (got_n[u] != nsym) begin
        failures++;
        $display("user %0d: %0d symbols, expected %0d", u, got_n[u], nsym);
      end
      for (int j = 0; j < nsym; j++) begin
        checks++;
        if (got[u][j] !== data[u][j]) begin
          failures++; errs++;
          if (errs < 5) $display("user %0d symbol %0d: got %b sent %b", u, j, got[u][j], data[u][j]);
        end else n_sym++;
      end
      $display("SF%0d user %0d: %0d symbol errors of %0d", sf_n, u, errs, nsym);
    end
  endtask

  task automatic run_predetect(input sf_e sf, input bit minus, input bit bpsk = 1'b0);
    int nsym;
    longint t0, t1;
    sf_n = sf_value(sf);
    nsym = DATA_CHIPS / sf_n;
    enable = 1'b0;
    write_ctrl(1, sf, minus, bpsk);
    setup_data(bpsk);
    for (int u = 0; u < U_MAX; u++) got_n[u] = 0;
    @(negedge clk) enable = 1'b1;
    wait (rx_busy);
    t0 = cyc;
    wait (!rx_busy);
    t1 = cyc;
    repeat (20) @(posedge clk);   // the mode-1 queue drains after the receiver is idle
    $display("SF%0d burst received in %0d cycles after capture start", sf_n, t1 - t0);
    check_decisions(nsym);
    // real time: the receiver is free again for the very next receive slot,
    // one slot pair later, and decodes that burst too
    begin
      for (int u = 0; u < U_MAX; u++) got_n[u] = 0;
      wait (rx_busy);
      checks++;
      if (cyc - t0 != 2 * SLOTS * L_DA) begin
        failures++;
        $display("next burst started %0d cycles after the previous one", cyc - t0);
      end else n_realtime++;
      wait (!rx_busy);
      repeat (20) @(posedge clk);   // the mode-1 queue drains after the receiver is idle
      check_decisions(nsym);
    end
    if (minus) n_minus++;
    if (bpsk) n_bpsk++;
  endtask

  initial begin
    codes[0] = 16'h0000;   // Walsh code 0
    codes[1] = 16'h5555;   // Walsh code 1 (alternating signs)
    taps = '{2'b01, 2'b01, 2'b01, 2'b00, 2'b11, 2'b01, 2'b01, 2'b01};
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    wr(CFG_DATAF, {48'b0, taps[7], taps[6], taps[5], taps[4], taps[3], taps[2], taps[1], taps[0]});
    for (int u = 0; u < U_MAX; u++) wr(CFG_CODE0 + 16'(u), 64'(codes[u]));
    wr(CFG_NBDEC, 64'd8);
    setup_training();

    // (1) spreading gain 16, '+' sign: the demonstrated configuration
    run_predetect(SF16, 1'b0);
    // (2) spreading gain 8, '-' sign
    run_predetect(SF8, 1'b1);
    n_sf_switch++;
    // (3) spreading gain 4
    run_predetect(SF4, 1'b0);
    n_sf_switch++;
    // (3b) BPSK data at gain 8
    run_predetect(SF8, 1'b0, 1'b1);

    // (4) mode 3: record a burst and read it out in order
    enable = 1'b0;
    hstream.delete();
    write_ctrl(3, SF16, 1'b0);
    @(negedge clk) enable = 1'b1;
    wait (rx_busy);
    wait (!rx_busy);
    repeat (20) @(posedge clk);   // the mode-1 queue drains after the receiver is idle
    checks++;
    if (hstream.size() != CAP) begin
      failures++; $display("record: %0d samples, expected %0d", hstream.size(), CAP);
    end
    for (int i = 0; i < CAP && i < hstream.size(); i++) begin
      checks++;
      if (hstream[i] != 32'(fed[i])) begin
        failures++;
        if (failures < 10) $display("record sample %0d: %0d vs %0d", i, hstream[i], fed[i]);
      end else n_record++;
    end

    // (5) mode 4: raw A/D stream of a whole receive slot
    enable = 1'b0;
    hstream.delete();
    write_ctrl(4, SF16, 1'b0);
    @(negedge clk) enable = 1'b1;
    wait (rx_slot);
    wait (!rx_slot);
    repeat (3) @(posedge clk);
    checks++;
    if (hstream.size() != SLOTS) begin
      failures++; $display("stream: %0d samples, expected %0d", hstream.size(), SLOTS);
    end
    for (int i = 0; i < SLOTS && i < hstream.size(); i++) begin
      checks++;
      if (hstream[i] != 32'(fed[i])) failures++;
      else n_stream++;
    end

    // (6) mode 2: base-band, boxcar of 8, one output per 8 samples
    enable = 1'b0;
    hstream.delete();
    write_ctrl(2, SF16, 1'b0);
    @(negedge clk) enable = 1'b1;
    wait (rx_slot);
    wait (!rx_slot);
    repeat (3) @(posedge clk);
    checks++;
    if (hstream.size() != SLOTS / 8) begin
      failures++; $display("narrowband: %0d outputs, expected %0d", hstream.size(), SLOTS / 8);
    end
    for (int b = 0; b < SLOTS / 8 && b < hstream.size(); b++) begin
      int er, ei;
      er = 0; ei = 0;
      for (int i = 0; i < 8; i++) begin
        int n, r;
        n = 8 * b + i; r = int'(fed[n]);
        case (n % 4)
          0: er += r;
          1: ei -= r;
          2: er -= r;
          default: ei += r;
        endcase
      end
      checks++;
      if (hstream[b] != {16'(ei >>> 4), 16'(er >>> 4)}) failures++;
      else n_narrow++;
    end

    $display("mechanisms: bursts=%0d neg_taps=%0d zero_taps=%0d chest=%0d symbols_ok=%0d phase_corr=%0d sf_switch=%0d minus_sign=%0d slot_switch=%0d record=%0d stream=%0d narrow=%0d realtime=%0d soft=%0d bpsk=%0d",
             n_bursts, n_neg_tap, n_zero_tap, n_chest, n_sym, n_phase_corr, n_sf_switch, n_minus,
             n_slot_switch, n_record, n_stream, n_narrow, n_realtime, n_soft, n_bpsk);
    checks++; if (n_soft == 0) failures++;
    checks++; if (n_bpsk == 0) failures++;
    checks++; if (n_realtime == 0) failures++;
    checks++; if (n_bursts == 0) failures++;
    checks++; if (n_neg_tap == 0) failures++;
    checks++; if (n_zero_tap == 0) failures++;
    checks++; if (n_chest == 0) failures++;
    checks++; if (n_sym == 0) failures++;
    checks++; if (n_phase_corr == 0) failures++;
    checks++; if (n_sf_switch == 0) failures++;
    checks++; if (n_minus == 0) failures++;
    checks++; if (n_slot_switch == 0) failures++;
    checks++; if (n_record == 0) failures++;
    checks++; if (n_stream == 0) failures++;
    checks++; if (n_narrow == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
