// sr_pkg: constants and types shared by the software-radio transceiver.
//
// The numbers follow a UMTS/TDD-like air interface: 4 samples per chip
// (sample rate fs = 4 x 3.84 MHz = 15.36 MHz), spreading gains 4, 8 or 16,
// QPSK data, 5 MHz signal bandwidth, and a least-squares channel estimator
// working on a cyclic training sequence. The sample-per-chip count, the
// spreading gains, the bandwidth and the two users per slot are the
// platform's own figures; the training length M=456, the per-user channel
// window Q=57 chips, the 56-chip cyclic prefix, the 976-chip data field and
// the 2560-chip slot are the UMTS/TDD burst-type-1 values and are this
// design's choice. The D/A up-sampling factor L_DA=8 is also a choice
// (f_d = 122.88 MHz, well above a 34.56 MHz IF).
package sr_pkg;

  // ---------------- air interface ----------------
  localparam int NC         = 4;     // samples per chip
  localparam int SF_MAX     = 16;    // largest spreading gain
  localparam int U_MAX      = 2;     // users per slot
  localparam int M_TRAIN    = 456;   // training (base sequence) length, chips
  localparam int Q_CHAN     = 57;    // channel window per user, chips
  localparam int P_PREFIX   = 56;    // cyclic prefix of the training, chips
  localparam int DATA_CHIPS = 976;   // data field, chips
  localparam int SLOT_CHIPS = 2560;  // TDD slot, chips
  localparam int L_DA       = 8;     // D/A up-sampling factor

  // ---------------- word widths ----------------
  localparam int X_W   = 16;   // transmit samples (pulse shaper .. D/A)
  localparam int ADC_W = 12;   // received A/D samples
  localparam int G_W   = 16;   // channel-estimate component
  localparam int F_W   = 20;   // matched-filter coefficient component
  localparam int V_W   = 32;   // matched-filter output component
  localparam int IA_W  = 24;   // 1/alpha coefficient component
  localparam int TW_W  = 16;   // twiddle component, unity = 2**TW_FRAC
  localparam int TW_FRAC = 14;

  // ---------------- pulse shape ----------------
  // Root-raised-cosine, roll-off 0.22, 4 samples per chip, 33 taps
  // (8 chips span), peak scaled to 4096:
  //   h[i] = round(4096 * rrc((i-16)/4) / rrc(0)),
  //   rrc(t) = [sin(pi t (1-b)) + 4 b t cos(pi t (1+b))] / [pi t (1-(4 b t)^2)], b = 0.22.
  localparam int RRC_TAPS = 33;
  localparam int RRC_FRAC = 12;
  typedef logic signed [13:0] coef_t;
  localparam coef_t RRC_COEF [RRC_TAPS] = '{
    14'sd98,   14'sd18,   -14'sd115, -14'sd202, -14'sd148, 14'sd58,   14'sd298,
    14'sd388,  14'sd191,  -14'sd252, -14'sd693, -14'sd772, -14'sd221, 14'sd953,
    14'sd2415, 14'sd3627, 14'sd4096, 14'sd3627, 14'sd2415, 14'sd953,  -14'sd221,
    -14'sd772, -14'sd693, -14'sd252, 14'sd191,  14'sd388,  14'sd298,  14'sd58,
    -14'sd148, -14'sd202, -14'sd115, 14'sd18,   14'sd98 };

  // ---------------- channel estimator band ----------------
  // DFT length L = M*NC = 1824. Only the bins inside
  // [fs/4 - W/2, fs/4 + W/2] with W = 5 MHz are kept:
  //   k = round(L*(1/4 - 2.5/15.36)) .. round(L*(1/4 + 2.5/15.36)) = 159 .. 753.
  localparam int DFT_L  = M_TRAIN * NC;
  localparam int BIN_LO = 159;
  localparam int BIN_HI = 753;

  // ---------------- types ----------------
  typedef enum logic [1:0] {SF4 = 2'd0, SF8 = 2'd1, SF16 = 2'd2} sf_e;

  typedef enum logic [2:0] {
    MODE_PREDETECT  = 3'd1,   // real-time symbol-rate output (operating mode 1)
    MODE_NARROWBAND = 3'd2,   // low-pass + down-sampled stream (mode 2)
    MODE_RECORD     = 3'd3,   // record a burst, then read it out (mode 3)
    MODE_STREAM     = 3'd4    // raw A/D samples straight to the host (mode 4)
  } mode_e;

  // 2-bit ternary D/A filter tap: 00 = 0, 01 = +1, 11 = -1
  typedef logic [1:0] tern_t;

  // host configuration address map (word addresses)
  localparam logic [15:0] CFG_CTRL    = 16'h0000; // [2:0] mode, [4:3] sf, [5] if sign (1 = minus), [6] tx_en, [7] rx_en, [8] rx spectrum inversion, [9] BPSK data
  localparam logic [15:0] CFG_DATAF   = 16'h0001; // [15:0] DA filter taps, 2 bits each
  localparam logic [15:0] CFG_CODE0   = 16'h0010; // + user: spreading code, bit i = chip i (1 means -1)
  localparam logic [15:0] CFG_NBDEC   = 16'h0020; // [7:0] mode-2 decimation factor
  localparam logic [15:0] CFG_TRAIN0  = 16'h1000; // + i: training chip i, [0] re sign, [1] im sign
  localparam logic [15:0] CFG_INVA0   = 16'h2000; // + (k - BIN_LO): {im[23:0], re[23:0]} of 1/(alpha_k L)
  localparam logic [15:0] CFG_DATA0   = 16'h4000; // + u*256 + symbol: tx data symbol (2 bits)

  function automatic int sf_value(sf_e sf);
    case (sf)
      SF4:     return 4;
      SF8:     return 8;
      default: return 16;
    endcase
  endfunction

endpackage
