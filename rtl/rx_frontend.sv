// rx_frontend: receiver of one burst, from A/D samples to QPSK decisions.
//
// Sequence started by `start` at the beginning of a receive slot:
//   1. CAPTURE: CAP_LEN samples (the whole burst plus the channel tail) are
//      written to the burst memory, one per fs_tick.
//   2. With record_only set (operating mode 3) the memory is then read out
//      in order on rec_valid/rec_data, one sample per clock, and the
//      sequence ends.
//   3. CHEST: the channel estimator works on the training window, which
//      starts after the cyclic prefix at sample P_LEN*NSAMP, and streams the
//      estimates of all U users into the MF synthesiser.
//   4. For each user: MFS builds the user's matched filter from its code,
//      then MF runs it at the symbol instants (P_LEN+M_LEN)*NSAMP + j*N*NSAMP
//      of the data field and the carrier synchroniser turns the results into
//      decisions, streamed on sym_valid with user and symbol index.
//      The matched filter computes NSP symbols at a time, so up to NSP
//      decisions leave on consecutive clocks.
// With the defaults a burst is finished 118 899 (gain 16), 120 393 (gain 8)
// or 131 829 (gain 4) clocks after `start`, inside the 163 840-clock slot
// pair, so every receive slot can be processed.
// Synchronisation of the burst is the slot timing; residual timing errors
// are part of the estimated channel, as in the platform's estimator.
// The sequencing itself is this design's choice.
module rx_frontend
  import sr_pkg::*;
#(
  parameter int M_LEN   = M_TRAIN,
  parameter int Q_LEN   = Q_CHAN,
  parameter int P_LEN   = P_PREFIX,
  parameter int D_CHIPS = DATA_CHIPS,
  parameter int NSAMP   = NC,
  parameter int U       = U_MAX,
  parameter int K_LO    = BIN_LO,
  parameter int K_HI    = BIN_HI,
  parameter int DEPTH   = 8192,
  parameter int NSP     = 4,          // symbols matched-filtered in parallel
  localparam int AW     = $clog2(DEPTH),
  localparam int NB     = K_HI - K_LO + 1,
  localparam int QNC    = Q_LEN * NSAMP,
  localparam int FA     = $clog2((SF_MAX - 1) * NSAMP + QNC),
  localparam int CAP_LEN = (P_LEN + M_LEN + D_CHIPS) * NSAMP + QNC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    fs_tick,
  input  logic signed [ADC_W-1:0] adc_in,
  input  logic                    start,
  input  logic                    record_only,
  input  logic                    invert,        // IF at fs (l - 1/4): undo spectrum inversion
  input  logic                    bpsk,          // data symbols are BPSK on the diagonal
  input  logic [SF_MAX-1:0]       code [U],
  input  sf_e                     sf,
  // host writes of 1/(alpha L)
  input  logic                    ia_we,
  input  logic [$clog2(NB)-1:0]   ia_addr,
  input  logic signed [IA_W-1:0]  ia_re,
  input  logic signed [IA_W-1:0]  ia_im,
  // status
  output logic                    busy,
  output logic                    done,
  output logic                    chest_done,
  // decisions
  output logic                    sym_valid,
  output logic [$clog2(U+1)-1:0]  sym_user,
  output logic [8:0]              sym_idx,
  output logic [1:0]              sym_bits,
  output logic signed [V_W-1:0]   sym_y_re,
  output logic signed [V_W-1:0]   sym_y_im,
  output logic signed [31:0]      sym_phase_err,
  // recorded samples (mode 3)
  output logic                    rec_valid,
  output logic signed [ADC_W-1:0] rec_data
);
  typedef enum logic [2:0] {R_IDLE, R_CAPTURE, R_READOUT, R_CHEST, R_MFS, R_MF} st_e;
  st_e st_q;

  logic [AW-1:0] buf_raddr, ce_raddr, mf_raddr, rd_q;
  logic signed [ADC_W-1:0] buf_rdata;
  logic cap_start, cap_busy, cap_done;
  logic ce_start, ce_busy;
  logic ms_start, ms_busy, ms_done;
  logic mf_start, mf_busy, mf_done;
  logic [$clog2(U+1)-1:0] u_q;
  logic rd_v_q, mf_done_q;

  // channel estimate stream
  logic                   g_valid;
  logic [$clog2(U+1)-1:0] g_user;
  logic [$clog2(QNC)-1:0] g_idx;
  logic signed [G_W-1:0]  g_re, g_im;
  // matched filter
  logic [FA:0]            flen;
  logic [FA-1:0]          f_raddr [NSP];
  logic signed [F_W-1:0]  f_re [NSP];
  logic signed [F_W-1:0]  f_im [NSP];
  logic                   v_valid;
  logic [8:0]             v_idx, v_idx_q;
  logic signed [V_W-1:0]  v_re, v_im;
  logic                   d_valid;
  logic [1:0]             d_bits;
  logic [31:0]            phase;

  always_comb begin
    unique case (st_q)
      R_CHEST: buf_raddr = ce_raddr;
      R_MF:    buf_raddr = mf_raddr;
      default: buf_raddr = rd_q;
    endcase
  end

  rx_sample_buffer #(.DEPTH(DEPTH), .W(ADC_W)) u_buf (
    .clk, .rst_n, .fs_tick, .start(cap_start), .invert, .len((AW+1)'(CAP_LEN)), .adc_in,
    .busy(cap_busy), .done(cap_done), .raddr(buf_raddr), .rdata(buf_rdata));

  channel_estimator #(.M_LEN(M_LEN), .Q_LEN(Q_LEN), .NSAMP(NSAMP), .U(U),
                      .K_LO(K_LO), .K_HI(K_HI), .SW(ADC_W), .AW(AW)) u_ce (
    .clk, .rst_n, .ia_we, .ia_addr, .ia_re, .ia_im,
    .start(ce_start), .base(AW'(P_LEN * NSAMP)), .busy(ce_busy), .done(chest_done),
    .s_raddr(ce_raddr), .s_rdata(buf_rdata),
    .g_valid, .g_user, .g_idx, .g_re, .g_im);

  mf_synth #(.Q_LEN(Q_LEN), .NSAMP(NSAMP), .U(U), .NRD(NSP)) u_ms (
    .clk, .rst_n, .g_valid, .g_user, .g_idx, .g_re, .g_im,
    .start(ms_start), .user(u_q), .code(code[u_q]), .sf,
    .busy(ms_busy), .done(ms_done), .flen, .f_raddr, .f_re, .f_im);

  matched_filter #(.AW(AW), .FA(FA), .SW(ADC_W), .NSP(NSP)) u_mf (
    .clk, .rst_n, .start(mf_start),
    .k0(AW'((P_LEN + M_LEN) * NSAMP)),
    .stride(AW'(sf_value(sf) * NSAMP)),
    .nsym(9'(D_CHIPS / sf_value(sf))),
    .flen, .busy(mf_busy), .done(mf_done),
    .s_raddr(mf_raddr), .s_rdata(buf_rdata), .f_raddr, .f_re, .f_im,
    .v_valid, .v_idx, .v_re, .v_im);

  carrier_sync #(.MU_SH(3)) u_cs (
    .clk, .rst_n, .clear(mf_start), .bpsk, .v_valid, .v_re, .v_im,
    .d_valid, .d_bits, .y_re(sym_y_re), .y_im(sym_y_im),
    .phase_err(sym_phase_err), .phase);

  // capture begins with the sample that comes with start
  assign cap_start = start && st_q == R_IDLE;
  assign sym_valid = d_valid;
  assign sym_bits  = d_bits;
  assign sym_idx   = v_idx_q;
  assign sym_user  = u_q;
  assign rec_data  = buf_rdata;
  assign rec_valid = rd_v_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= R_IDLE; busy <= 1'b0; done <= 1'b0;
      ce_start <= 1'b0; ms_start <= 1'b0; mf_start <= 1'b0;
      u_q <= '0; rd_q <= '0; rd_v_q <= 1'b0; v_idx_q <= '0; mf_done_q <= 1'b0;
    end else begin
      done      <= 1'b0;
      ce_start  <= 1'b0;
      ms_start  <= 1'b0;
      mf_start  <= 1'b0;
      rd_v_q    <= 1'b0;
      mf_done_q <= mf_done;
      if (v_valid) v_idx_q <= v_idx;
      unique case (st_q)
        R_IDLE: if (start) begin
          busy <= 1'b1; st_q <= R_CAPTURE;
        end
        R_CAPTURE: if (cap_done) begin
          if (record_only) begin
            st_q <= R_READOUT; rd_q <= '0;
          end else begin
            st_q <= R_CHEST; ce_start <= 1'b1;
          end
        end
        R_READOUT: begin
          rd_v_q <= 1'b1;
          if (rd_q == AW'(CAP_LEN - 1)) begin
            st_q <= R_IDLE; busy <= 1'b0; done <= 1'b1;
          end
          rd_q <= rd_q + 1'b1;
        end
        R_CHEST: if (chest_done) begin
          st_q <= R_MFS; u_q <= '0; ms_start <= 1'b1;
        end
        R_MFS: if (ms_done) begin
          st_q <= R_MF; mf_start <= 1'b1;
        end
        // the last decision leaves carrier_sync one clock after mf_done
        R_MF: if (mf_done_q) begin
          if (u_q == ($clog2(U+1))'(U - 1)) begin
            st_q <= R_IDLE; busy <= 1'b0; done <= 1'b1;
          end else begin
            u_q <= u_q + 1'b1; st_q <= R_MFS; ms_start <= 1'b1;
          end
        end
        default: st_q <= R_IDLE;
      endcase
    end
  end
endmodule
