// channel_estimator: pass-band least-squares multi-user channel estimation.
//
// All users send cyclic shifts (by Q_LEN chips) of one training sequence a
// of M_LEN chips, so the L = M_LEN*NSAMP samples w of the training window
// are the circular convolution of a (spread to NSAMP samples per chip) with
// g, the concatenation of the users' channels, each QNC = Q_LEN*NSAMP
// samples long. The least-squares estimate is
//     g = IDFT{ DFT{w} / alpha_bar },
// alpha_bar being the DFT of a repeated NSAMP times. The received signal is
// real and centred at fs/4, so only the bins K_LO..K_HI of the band
// [fs/4 - W/2, fs/4 + W/2] are computed and the rest are taken as zero: this
// keeps the positive-frequency replica, which low-pass filters the estimate
// and leaves the analytic (complex) pass-band channel j^n g_env[n].
// Implementation: direct (not fast) transforms on NPAR parallel lanes. Each
// lane has a CORDIC that makes its twiddle e^{-+j 2 pi idx / L} from an angle
// index kept modulo L, and a complex multiply-accumulator; all lanes share
// one memory read per clock.
//   1. DFT, in groups of NPAR bins: every sample w[n] read is used by all
//      lanes, lane p accumulating W_k = sum_n w[n] e^{-j 2 pi k n / L} for
//      k = k0 + p. Then, one lane per clock, G_k = W_k * ia_k is stored, with
//      ia_k = 1/(alpha_k L) written by the host (scale 2**30) on the ia_*
//      port.
//   2. IDFT, in groups of NPAR output taps n = u*QNC + d: every G_k read is
//      used by all lanes, g[n] = sum_k G_k e^{+j 2 pi k n / L}; the taps are
//      then streamed out one per clock on g_valid with their user and delay.
// The algorithm (LS estimate in the DFT domain, products only inside the
// band) is the platform's; the direct transforms, the lanes, the CORDIC
// twiddles and the scaling are this design's choices. With the default 32
// lanes one burst takes 44 718 clocks, so that a burst received in one
// slot is finished well before the next receive slot.
// Scaling: W >> 14, then (W * ia) >> 16, then g = IDFT >> 28, saturated to
// G_W bits; g is in A/D units per unit training chip.
// Timing: exactly ceil(NB/NPAR)*(L+1+NPAR) + ceil(U*QNC/NPAR)*(NB+2+NPAR)
// cycles (NB = K_HI-K_LO+1) from the start cycle to done. Samples are read
// through s_raddr/s_rdata (one-cycle latency) starting at base.
module channel_estimator
  import sr_pkg::*;
#(
  parameter int M_LEN = M_TRAIN,
  parameter int Q_LEN = Q_CHAN,
  parameter int NSAMP = NC,
  parameter int U     = U_MAX,
  parameter int K_LO  = BIN_LO,
  parameter int K_HI  = BIN_HI,
  parameter int SW    = ADC_W,
  parameter int AW    = 13,
  parameter int NPAR  = 32,            // parallel lanes (bins or output taps)
  localparam int L    = M_LEN * NSAMP,
  localparam int NB   = K_HI - K_LO + 1,
  localparam int QNC  = Q_LEN * NSAMP
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // host writes of 1/(alpha_k L)
  input  logic                   ia_we,
  input  logic [$clog2(NB)-1:0]  ia_addr,
  input  logic signed [IA_W-1:0] ia_re,
  input  logic signed [IA_W-1:0] ia_im,
  // control
  input  logic                   start,
  input  logic [AW-1:0]          base,
  output logic                   busy,
  output logic                   done,
  // sample memory read port
  output logic [AW-1:0]          s_raddr,
  input  logic signed [SW-1:0]   s_rdata,
  // channel estimate stream
  output logic                   g_valid,
  output logic [$clog2(U+1)-1:0] g_user,
  output logic [$clog2(QNC)-1:0] g_idx,
  output logic signed [G_W-1:0]  g_re,
  output logic signed [G_W-1:0]  g_im
);
  localparam longint ANG_STEP = ((64'd1 << 32) + longint'(L / 2)) / longint'(L);
  localparam int IW  = $clog2(L + 1);
  localparam int GMW = 32;
  localparam int NO  = U * QNC;                        // outputs of the IDFT
  localparam int JW  = $clog2(NPAR + 1);
  localparam logic [IW-1:0] KSTEP = IW'((longint'(K_LO) * NPAR) % L);  // K_LO*NPAR mod L

  typedef enum logic [2:0] {S_IDLE, S_DFT, S_DFT_W, S_DFT_WB, S_IDFT_INIT, S_IDFT, S_IDFT_W, S_EMIT} st_e;
  st_e st_q;

  logic signed [IA_W-1:0] ia_mem_re [NB];
  logic signed [IA_W-1:0] ia_mem_im [NB];
  logic signed [GMW-1:0]  g_mem_re  [NB];
  logic signed [GMW-1:0]  g_mem_im  [NB];

  always_ff @(posedge clk) begin
    if (ia_we) begin
      ia_mem_re[ia_addr] <= ia_re;
      ia_mem_im[ia_addr] <= ia_im;
    end
  end

  function automatic logic [IW-1:0] add_mod(logic [IW-1:0] a, logic [IW-1:0] b);
    logic [IW:0] t;
    t = {1'b0, a} + {1'b0, b};
    return (t >= (IW+1)'(L)) ? IW'(t - (IW+1)'(L)) : IW'(t);
  endfunction

  // group state
  logic [IW-1:0]            kb_q;     // DFT: first bin of the group
  logic [IW-1:0]            nb_q;     // IDFT: first output index of the group
  logic [IW-1:0]            kn_q;     // IDFT: K_LO * nb_q mod L
  logic [IW-1:0]            n_q;      // DFT: sample index
  logic [IW-1:0]            cnt_q;    // IDFT: bin counter
  logic [JW-1:0]            j_q;      // write-back / emission lane
  logic [$clog2(U+1)-1:0]   u_q;
  logic [$clog2(QNC+1)-1:0] d_q;
  logic                     vb_q, lastb_q;
  logic signed [GMW-1:0]    gb_re_q, gb_im_q;

  // ---------------- lanes ----------------
  logic [IW-1:0]          idx_q  [NPAR];   // angle index of the next product
  logic [IW-1:0]          step_q [NPAR];
  logic [IW-1:0]          idxb_q [NPAR];   // angle index of the product in stage B
  logic signed [63:0]     acc_re_q [NPAR];
  logic signed [63:0]     acc_im_q [NPAR];
  logic signed [TW_W+1:0] tw_c [NPAR];
  logic signed [TW_W+1:0] tw_s [NPAR];

  for (genvar p = 0; p < NPAR; p++) begin : g_lane
    logic [31:0] ang, z_unused;
    // cos + j sin of 2 pi idx / L, unity 2**TW_FRAC
    assign ang = 32'(longint'(idxb_q[p]) * ANG_STEP);
    cordic #(.W(TW_W + 2), .ITER(16)) u_tw (
      .vectoring(1'b0), .x_in((TW_W+2)'(2 ** TW_FRAC)), .y_in('0), .z_in(ang),
      .x_out(tw_c[p]), .y_out(tw_s[p]), .z_out(z_unused));
  end

  assign s_raddr = base + AW'(n_q);

  function automatic logic signed [G_W-1:0] sat_g(logic signed [63:0] a);
    if (a > 64'sd32767)       return 16'sh7fff;
    else if (a < -64'sd32768) return 16'sh8000;
    else                      return G_W'(a);
  endfunction

  // write-back of lane j_q: G_k = W_k * ia_k
  logic [IW-1:0]      kj;
  logic signed [63:0] wk_re, wk_im, p_re, p_im;
  always_comb begin
    kj    = kb_q + IW'(j_q) - IW'(K_LO);
    wk_re = acc_re_q[j_q] >>> TW_FRAC;
    wk_im = acc_im_q[j_q] >>> TW_FRAC;
    p_re  = '0;
    p_im  = '0;
    if (int'(kj) < NB) begin
      p_re = (wk_re * 64'(ia_mem_re[kj]) - wk_im * 64'(ia_mem_im[kj])) >>> 16;
      p_im = (wk_re * 64'(ia_mem_im[kj]) + wk_im * 64'(ia_mem_re[kj])) >>> 16;
    end
  end

  // lane set-up for a DFT group starting at bin k, or an IDFT group at output n
  // (kn = K_LO * n mod L); lane p gets k + p, resp. n + p and K_LO (n + p) mod L
  function automatic logic [IW-1:0] lane_kn(logic [IW-1:0] kn, int p);
    return add_mod(kn, IW'((longint'(K_LO) * p) % L));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE; busy <= 1'b0; done <= 1'b0;
      kb_q <= '0; nb_q <= '0; kn_q <= '0; n_q <= '0; cnt_q <= '0; j_q <= '0;
      u_q <= '0; d_q <= '0; vb_q <= 1'b0; lastb_q <= 1'b0;
      gb_re_q <= '0; gb_im_q <= '0;
      for (int p = 0; p < NPAR; p++) begin
        idx_q[p] <= '0; step_q[p] <= '0; idxb_q[p] <= '0; acc_re_q[p] <= '0; acc_im_q[p] <= '0;
      end
      g_valid <= 1'b0; g_user <= '0; g_idx <= '0; g_re <= '0; g_im <= '0;
    end else begin
      done    <= 1'b0;
      g_valid <= 1'b0;
      vb_q    <= 1'b0;
      lastb_q <= 1'b0;
      // stage B: every lane accumulates its product
      if (vb_q)
        for (int p = 0; p < NPAR; p++) begin
          if (st_q == S_DFT || st_q == S_DFT_W) begin
            acc_re_q[p] <= acc_re_q[p] + 64'(s_rdata) * 64'(tw_c[p]);
            acc_im_q[p] <= acc_im_q[p] - 64'(s_rdata) * 64'(tw_s[p]);
          end else begin
            acc_re_q[p] <= acc_re_q[p] + 64'(gb_re_q) * 64'(tw_c[p]) - 64'(gb_im_q) * 64'(tw_s[p]);
            acc_im_q[p] <= acc_im_q[p] + 64'(gb_re_q) * 64'(tw_s[p]) + 64'(gb_im_q) * 64'(tw_c[p]);
          end
        end
      unique case (st_q)
        S_IDLE: if (start) begin
          busy <= 1'b1; st_q <= S_DFT;
          kb_q <= IW'(K_LO); n_q <= '0;
          for (int p = 0; p < NPAR; p++) begin
            idx_q[p] <= '0; step_q[p] <= IW'(K_LO + p); acc_re_q[p] <= '0; acc_im_q[p] <= '0;
          end
        end
        // stage A of the DFT: read w[n]; lane p remembers (k+p)*n mod L
        S_DFT: begin
          vb_q <= 1'b1;
          for (int p = 0; p < NPAR; p++) begin
            idxb_q[p] <= idx_q[p];
            idx_q[p]  <= add_mod(idx_q[p], step_q[p]);
          end
          if (n_q == IW'(L - 1)) begin
            lastb_q <= 1'b1;
            st_q    <= S_DFT_W;
          end else begin
            n_q <= n_q + 1'b1;
          end
        end
        // the last product accumulates in this cycle
        S_DFT_W: begin
          j_q  <= '0;
          st_q <= S_DFT_WB;
        end
        // one lane per cycle: G_k = W_k / (alpha_k L) into the bin memory
        S_DFT_WB: begin
          if (int'(kj) < NB) begin
            g_mem_re[kj] <= GMW'(p_re);
            g_mem_im[kj] <= GMW'(p_im);
          end
          j_q <= j_q + 1'b1;
          if (j_q == JW'(NPAR - 1)) begin
            n_q <= '0;
            for (int p = 0; p < NPAR; p++) begin
              idx_q[p] <= '0; step_q[p] <= kb_q + IW'(NPAR + p); acc_re_q[p] <= '0; acc_im_q[p] <= '0;
            end
            if (int'(kb_q) + NPAR > K_HI) begin
              st_q <= S_IDFT_INIT;
              nb_q <= '0; kn_q <= '0; u_q <= '0; d_q <= '0;
            end else begin
              kb_q <= kb_q + IW'(NPAR);
              st_q <= S_DFT;
            end
          end
        end
        S_IDFT_INIT: begin
          cnt_q <= '0;
          for (int p = 0; p < NPAR; p++) begin
            step_q[p]   <= nb_q + IW'(p);
            idx_q[p]    <= lane_kn(kn_q, p);
            acc_re_q[p] <= '0;
            acc_im_q[p] <= '0;
          end
          st_q <= S_IDFT;
        end
        // stage A of the IDFT: read G_k; lane p remembers k*(n+p) mod L
        S_IDFT: begin
          vb_q    <= 1'b1;
          gb_re_q <= g_mem_re[cnt_q];
          gb_im_q <= g_mem_im[cnt_q];
          for (int p = 0; p < NPAR; p++) begin
            idxb_q[p] <= idx_q[p];
            idx_q[p]  <= add_mod(idx_q[p], step_q[p]);
          end
          if (cnt_q == IW'(NB - 1)) begin
            lastb_q <= 1'b1;
            st_q    <= S_IDFT_W;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        S_IDFT_W: begin
          j_q  <= '0;
          st_q <= S_EMIT;
        end
        // one output tap per cycle, in user / delay order
        S_EMIT: begin
          if (int'(nb_q) + int'(j_q) < NO) begin
            g_valid <= 1'b1;
            g_user  <= u_q;
            g_idx   <= ($clog2(QNC))'(d_q);
            g_re    <= sat_g(acc_re_q[j_q] >>> (2 * TW_FRAC));
            g_im    <= sat_g(acc_im_q[j_q] >>> (2 * TW_FRAC));
            if (d_q == ($clog2(QNC+1))'(QNC - 1)) begin
              d_q <= '0;
              u_q <= u_q + 1'b1;
            end else begin
              d_q <= d_q + 1'b1;
            end
          end
          j_q <= j_q + 1'b1;
          if (j_q == JW'(NPAR - 1)) begin
            if (int'(nb_q) + NPAR >= NO) begin
              st_q <= S_IDLE; busy <= 1'b0; done <= 1'b1;
            end else begin
              nb_q <= nb_q + IW'(NPAR);
              kn_q <= add_mod(kn_q, KSTEP);
              st_q <= S_IDFT_INIT;
            end
          end
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end
endmodule
