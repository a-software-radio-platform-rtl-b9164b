// sdr_top: one antenna chain of a software-radio TDD transceiver.
//
// The chain generates and receives UMTS/TDD-like bursts at an IF of
// f_IF = fs (l +- 1/4), so that all carrier handling reduces to sign changes
// at fs/4 and the A/D and D/A converters work at rates of the order of the
// signal bandwidth:
//   transmit: burst_builder (training + spread QPSK/BPSK of U users)
//             -> pulse_shaper (4 samples per chip) -> if_upconverter
//             (Re{j^(+-n) x[n]}) -> da_comp_filter (x L_DA, ternary taps)
//             -> dac_out, one code per clock;
//   receive:  adc_in (sampled on fs_tick) -> rx_frontend (pass-band channel
//             estimation, matched filter synthesis, matched filtering at the
//             symbol instants, decision-directed carrier tracking), or
//             nb_decimator for the narrowband mode.
// tdd_slot_timer alternates a transmit slot and a receive slot. The host
// configures everything through a word-addressed write port (map in
// sr_pkg) and receives one 32-bit stream whose content depends on the
// operating mode:
//   mode 1 (pre-detection): two words per symbol, the header
//                           {4'h1, user[3:0], symbol[7:0], 14'b0, bits[1:0]}
//                           and then the phase-corrected matched-filter
//                           output {im, re}, each y >>> 2 saturated to 16
//                           bits, for combining on the host (an 8-entry
//                           queue evens out decisions that come together)
//   mode 2 (narrowband):    {im[19:4], re[19:4]} of the decimator
//   mode 3 (record):        the recorded burst, sign-extended samples, in order
//   mode 4 (stream):        every A/D sample of the receive slot, sign-extended
// The host, the PCI bus, the converters and the radio are outside: their
// signals are the ports. One clock, at the D/A rate f_d = L_DA*fs.
module sdr_top
  import sr_pkg::*;
#(
  parameter int M_LEN   = M_TRAIN,
  parameter int Q_LEN   = Q_CHAN,
  parameter int P_LEN   = P_PREFIX,
  parameter int D_CHIPS = DATA_CHIPS,
  parameter int U       = U_MAX,
  parameter int K_LO    = BIN_LO,
  parameter int K_HI    = BIN_HI,
  parameter int SLOT    = SLOT_CHIPS,
  parameter int L       = L_DA,
  parameter int DEPTH   = 8192
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enable,
  // host configuration
  input  logic                    cfg_we,
  input  logic [15:0]             cfg_addr,
  input  logic [63:0]             cfg_wdata,
  // converters
  output logic signed [X_W-1:0]   dac_out,
  input  logic signed [ADC_W-1:0] adc_in,
  output logic                    fs_tick,
  // slot status
  output logic                    tx_slot,
  output logic                    rx_slot,
  output logic                    rx_busy,
  output logic                    chest_done,
  // host stream
  output logic                    host_valid,
  output logic [31:0]             host_data
);
  localparam int NB = K_HI - K_LO + 1;

  // ---------------- configuration registers ----------------
  mode_e             mode_q;
  sf_e               sf_q;
  logic              if_minus_q, tx_en_q, rx_en_q, rx_inv_q, bpsk_q;
  tern_t             taps_q [L];
  logic [SF_MAX-1:0] code_q [U];
  logic [7:0]        nbdec_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q <= MODE_PREDETECT; sf_q <= SF16; if_minus_q <= 1'b0;
      tx_en_q <= 1'b0; rx_en_q <= 1'b0; rx_inv_q <= 1'b0; bpsk_q <= 1'b0; nbdec_q <= 8'd4;
      for (int i = 0; i < L; i++) taps_q[i] <= 2'b01;
      for (int u = 0; u < U; u++) code_q[u] <= '0;
    end else if (cfg_we) begin
      if (cfg_addr == CFG_CTRL) begin
        mode_q     <= mode_e'(cfg_wdata[2:0]);
        sf_q       <= sf_e'(cfg_wdata[4:3]);
        if_minus_q <= cfg_wdata[5];
        tx_en_q    <= cfg_wdata[6];
        rx_en_q    <= cfg_wdata[7];
        rx_inv_q   <= cfg_wdata[8];
        bpsk_q     <= cfg_wdata[9];
      end
      if (cfg_addr == CFG_DATAF)
        for (int i = 0; i < L; i++) taps_q[i] <= cfg_wdata[2*i +: 2];
      for (int u = 0; u < U; u++)
        if (cfg_addr == CFG_CODE0 + 16'(u)) code_q[u] <= cfg_wdata[SF_MAX-1:0];
      if (cfg_addr == CFG_NBDEC) nbdec_q <= cfg_wdata[7:0];
    end
  end

  logic train_we, sym_we, ia_we;
  assign train_we = cfg_we && cfg_addr[15:12] == 4'h1;
  assign ia_we    = cfg_we && cfg_addr[15:12] == 4'h2;
  assign sym_we   = cfg_we && cfg_addr[15:12] == 4'h4;

  // ---------------- timing ----------------
  logic chip_tick, slot_start;
  tdd_slot_timer #(.L_DIV(L), .SAMP_CHIP(NC), .CHIPS_SLOT(SLOT)) u_tdd (
    .clk, .rst_n, .enable, .fs_tick, .chip_tick, .slot_start, .tx_slot, .rx_slot);

  // ---------------- transmitter ----------------
  logic signed [2:0]     chip_re, chip_im;
  logic                  bb_busy;
  logic signed [X_W-1:0] x_re, x_im, xp;
  logic                  x_valid, xp_valid;
  logic [U-1:0]          user_en;
  assign user_en = '1;

  burst_builder #(.U(U), .M_LEN(M_LEN), .Q_LEN(Q_LEN), .P_LEN(P_LEN), .D_CHIPS(D_CHIPS), .CW(3)) u_bb (
    .clk, .rst_n,
    .train_we, .train_addr(cfg_addr[9:0]), .train_data(cfg_wdata[1:0]),
    .sym_we, .sym_user(cfg_addr[8 +: $clog2(U)]), .sym_addr(cfg_addr[7:0]), .sym_data(cfg_wdata[1:0]), .bpsk(bpsk_q),
    .code(code_q), .user_en, .sf(sf_q),
    .chip_en(chip_tick), .start(slot_start && tx_slot && tx_en_q),
    .busy(bb_busy), .chip_re, .chip_im);

  pulse_shaper #(.CW(3), .W(X_W), .NSAMP(NC)) u_ps (
    .clk, .rst_n, .fs_tick, .chip_load(chip_tick), .chip_re, .chip_im,
    .x_re, .x_im, .x_valid);

  if_upconverter #(.W(X_W)) u_if (
    .clk, .rst_n, .fs_tick(x_valid), .minus_sign(if_minus_q), .x_re, .x_im,
    .xp, .xp_valid);

  da_comp_filter #(.L(L), .W(X_W)) u_da (
    .clk, .rst_n, .fs_tick(xp_valid), .xp, .taps(taps_q), .dac_out);

  // ---------------- receiver ----------------
  logic                   rx_start, rx_done;
  logic                   sym_valid;
  logic [$clog2(U+1)-1:0] sym_user;
  logic [8:0]             sym_idx;
  logic [1:0]             sym_bits;
  logic signed [V_W-1:0]  sym_y_re, sym_y_im;
  logic signed [31:0]     sym_perr;
  logic                   rec_valid;
  logic signed [ADC_W-1:0] rec_data;
  logic [SF_MAX-1:0]      rx_code [U];

  always_comb for (int u = 0; u < U; u++) rx_code[u] = code_q[u];

  assign rx_start = slot_start && rx_slot && rx_en_q &&
                    (mode_q == MODE_PREDETECT || mode_q == MODE_RECORD);

  rx_frontend #(.M_LEN(M_LEN), .Q_LEN(Q_LEN), .P_LEN(P_LEN), .D_CHIPS(D_CHIPS),
                .NSAMP(NC), .U(U), .K_LO(K_LO), .K_HI(K_HI), .DEPTH(DEPTH)) u_rx (
    .clk, .rst_n, .fs_tick, .adc_in, .start(rx_start), .record_only(mode_q == MODE_RECORD), .invert(rx_inv_q), .bpsk(bpsk_q),
    .code(rx_code), .sf(sf_q),
    .ia_we, .ia_addr(cfg_addr[$clog2(NB)-1:0]),
    .ia_re(cfg_wdata[IA_W-1:0]), .ia_im(cfg_wdata[IA_W+31:32]),
    .busy(rx_busy), .done(rx_done), .chest_done,
    .sym_valid, .sym_user, .sym_idx, .sym_bits, .sym_y_re, .sym_y_im,
    .sym_phase_err(sym_perr), .rec_valid, .rec_data);

  logic                 nb_valid;
  logic signed [19:0]   nb_re, nb_im;
  nb_decimator #(.SW(ADC_W), .OW(20)) u_nb (
    .clk, .rst_n, .enable(rx_slot && rx_en_q && mode_q == MODE_NARROWBAND),
    .fs_tick, .r_in(adc_in), .dec(nbdec_q), .o_valid(nb_valid), .o_re(nb_re), .o_im(nb_im));

  // ---------------- host stream ----------------
  function automatic logic signed [15:0] soft16(logic signed [V_W-1:0] y);
    logic signed [V_W-1:0] t;
    t = y >>> 2;
    if (t > V_W'(32767))       return 16'sh7fff;
    else if (t < -V_W'(32768)) return 16'sh8000;
    else                       return 16'(t);
  endfunction

  // mode 1: decisions can arrive on consecutive clocks (the matched filter
  // finishes several symbols together) and each takes two host words, so
  // they wait in a small FIFO; a group of at most 4 is drained long before
  // the next group comes
  localparam int QD = 8;
  logic [63:0]            q_mem [QD];
  logic [$clog2(QD):0]    q_wr, q_rd;
  logic                   q_push, q_empty, q_half;
  assign q_push  = sym_valid && mode_q == MODE_PREDETECT;
  assign q_empty = q_wr == q_rd;

  always_ff @(posedge clk) begin
    if (q_push)
      q_mem[q_wr[$clog2(QD)-1:0]] <= {{4'h1, 4'(sym_user), sym_idx[7:0], 14'b0, sym_bits},
                                      soft16(sym_y_im), soft16(sym_y_re)};
  end

  a_queue_room: assert property (@(posedge clk) disable iff (!rst_n)
    q_push |-> (q_wr - q_rd) != ($clog2(QD)+1)'(QD))
    else $error("mode-1 output queue overflow");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      host_valid <= 1'b0; host_data <= '0; q_wr <= '0; q_rd <= '0; q_half <= 1'b0;
    end else begin
      host_valid <= 1'b0;
      if (q_push) q_wr <= q_wr + 1'b1;
      unique case (mode_q)
        // header word, then soft word, of the oldest queued decision
        MODE_PREDETECT: if (!q_empty) begin
          host_valid <= 1'b1;
          host_data  <= q_half ? q_mem[q_rd[$clog2(QD)-1:0]][31:0] : q_mem[q_rd[$clog2(QD)-1:0]][63:32];
          q_half     <= !q_half;
          if (q_half) q_rd <= q_rd + 1'b1;
        end
        MODE_NARROWBAND: if (nb_valid) begin
          host_valid <= 1'b1;
          host_data  <= {nb_im[19:4], nb_re[19:4]};
        end
        MODE_RECORD: if (rec_valid) begin
          host_valid <= 1'b1;
          host_data  <= 32'(rec_data);
        end
        MODE_STREAM: if (fs_tick && rx_slot && rx_en_q) begin
          host_valid <= 1'b1;
          host_data  <= 32'(adc_in);
        end
        default: ;
      endcase
    end
  end
endmodule
