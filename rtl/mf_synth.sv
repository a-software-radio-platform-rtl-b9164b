// mf_synth: synthesis of a user's matched filter from its channel estimate.
//
// The overall response of one data symbol is the spreading code convolved
// with the chip pulse and the channel, f[n] = sum_i s_i g[n - i*NSAMP]
// (i = 0..N-1), so the matched filter follows from the estimate g by
// adding or subtracting shifted copies of it: no multiplier is needed.
// The channel estimates of all users are taken from the estimator's stream
// (g_valid/g_user/g_idx) into a local memory. On start the filter of user
// `user` is built for spreading gain N (sf) and code `code` (bit 1 = -1):
// flen = (N-1)*NSAMP + QNC taps, one addition per clock, so the build takes
// flen*N + 1 cycles; done then pulses. The filter is read through
// NRD independent read ports f_raddr/f_re/f_im with one cycle of latency. This is the platform's MF
// synthesis (f = s * g); the sequential structure is this design's choice.
module mf_synth
  import sr_pkg::*;
#(
  parameter int Q_LEN = Q_CHAN,
  parameter int NSAMP = NC,
  parameter int U     = U_MAX,
  parameter int NRD   = 1,             // filter read ports
  localparam int QNC  = Q_LEN * NSAMP,
  localparam int FMAX = (SF_MAX - 1) * NSAMP + QNC,
  localparam int FA   = $clog2(FMAX)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // channel estimate stream
  input  logic                   g_valid,
  input  logic [$clog2(U+1)-1:0] g_user,
  input  logic [$clog2(QNC)-1:0] g_idx,
  input  logic signed [G_W-1:0]  g_re,
  input  logic signed [G_W-1:0]  g_im,
  // build command
  input  logic                   start,
  input  logic [$clog2(U+1)-1:0] user,
  input  logic [SF_MAX-1:0]      code,
  input  sf_e                    sf,
  output logic                   busy,
  output logic                   done,
  output logic [FA:0]            flen,
  // filter read ports
  input  logic [FA-1:0]          f_raddr [NRD],
  output logic signed [F_W-1:0]  f_re [NRD],
  output logic signed [F_W-1:0]  f_im [NRD]
);
  logic signed [G_W-1:0] gm_re [U][QNC];
  logic signed [G_W-1:0] gm_im [U][QNC];
  logic signed [F_W-1:0] fm_re [FMAX];
  logic signed [F_W-1:0] fm_im [FMAX];

  logic [FA:0]  n_q;
  logic [4:0]   i_q, nsf_q;
  logic [$clog2(U+1)-1:0] u_q;
  logic [SF_MAX-1:0] code_q;
  logic signed [F_W-1:0] acc_re_q, acc_im_q;

  always_ff @(posedge clk) begin
    if (g_valid) begin
      gm_re[g_user][g_idx] <= g_re;
      gm_im[g_user][g_idx] <= g_im;
    end
    for (int r = 0; r < NRD; r++) begin
      f_re[r] <= fm_re[f_raddr[r]];
      f_im[r] <= fm_im[f_raddr[r]];
    end
  end

  // tap of g used by term i of output n
  int tap;
  logic signed [F_W-1:0] t_re, t_im;
  always_comb begin
    tap  = int'(n_q) - int'(i_q) * NSAMP;
    t_re = '0;
    t_im = '0;
    if (tap >= 0 && tap < QNC) begin
      t_re = F_W'(gm_re[u_q][tap]);
      t_im = F_W'(gm_im[u_q][tap]);
    end
    if (code_q[i_q[3:0]]) begin
      t_re = -t_re;
      t_im = -t_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; n_q <= '0; i_q <= '0; nsf_q <= 5'd16;
      u_q <= '0; code_q <= '0; acc_re_q <= '0; acc_im_q <= '0; flen <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy   <= 1'b1;
        n_q    <= '0;
        i_q    <= '0;
        nsf_q  <= 5'(sf_value(sf));
        u_q    <= user;
        code_q <= code;
        acc_re_q <= '0;
        acc_im_q <= '0;
        flen   <= (FA+1)'((sf_value(sf) - 1) * NSAMP + QNC);
      end else if (busy) begin
        if (i_q == nsf_q - 1) begin
          fm_re[n_q[FA-1:0]] <= acc_re_q + t_re;
          fm_im[n_q[FA-1:0]] <= acc_im_q + t_im;
          acc_re_q <= '0;
          acc_im_q <= '0;
          i_q <= '0;
          if (n_q == flen - 1'b1) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
          n_q <= n_q + 1'b1;
        end else begin
          acc_re_q <= acc_re_q + t_re;
          acc_im_q <= acc_im_q + t_im;
          i_q <= i_q + 1'b1;
        end
      end
    end
  end
endmodule
