// pulse_shaper: chip-rate to sample-rate interpolating pulse-shaping filter.
//
// Forms x[n] = sum_k a[k] psi[n - NC*k], NC samples per chip, with the pulse
// psi held in sr_pkg (33-tap root raised cosine, roll-off 0.22, peak 4096).
// It is a polyphase filter: the last ceil(TAPS/NC) chips sit in a shift
// register, and output phase p (0..NC-1) uses the taps p, p+NC, p+2NC, ...
// A new chip is shifted in on the fs_tick that also carries chip_load
// (the first sample of each chip). Chips are small complex integers, so the
// products are short. Outputs are registered: x for phase p of chip k is
// ready the cycle after that fs_tick. The sum is saturated to W bits.
// The pulse shape itself is this design's choice (UMTS uses this RRC); the
// platform specifies only a pulse band-limited to the signal bandwidth.
module pulse_shaper
  import sr_pkg::*;
#(
  parameter int CW    = 3,
  parameter int W     = X_W,
  parameter int NSAMP = NC
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 fs_tick,
  input  logic                 chip_load,
  input  logic signed [CW-1:0] chip_re,
  input  logic signed [CW-1:0] chip_im,
  output logic signed [W-1:0]  x_re,
  output logic signed [W-1:0]  x_im,
  output logic                 x_valid
);
  localparam int NCHIP = (RRC_TAPS + NSAMP - 1) / NSAMP;
  localparam int AW    = W + 6;

  logic signed [CW-1:0] sr_re [NCHIP];
  logic signed [CW-1:0] sr_im [NCHIP];
  logic [$clog2(NSAMP+1)-1:0] ph;
  logic [$clog2(NSAMP+1)-1:0] ph_q;

  function automatic logic signed [W-1:0] sat(logic signed [AW-1:0] a);
    if (a > AW'(2**(W-1) - 1))       return {1'b0, {(W-1){1'b1}}};
    else if (a < -AW'(2**(W-1)))     return {1'b1, {(W-1){1'b0}}};
    else                             return W'(a);
  endfunction

  // the taps see the shift register as it will be after this tick
  logic signed [CW-1:0] v_re [NCHIP];
  logic signed [CW-1:0] v_im [NCHIP];
  logic signed [AW-1:0] acc_re, acc_im;
  always_comb begin
    ph = chip_load ? '0 : ph_q;
    v_re[0] = chip_load ? chip_re : sr_re[0];
    v_im[0] = chip_load ? chip_im : sr_im[0];
    for (int m = 1; m < NCHIP; m++) begin
      v_re[m] = chip_load ? sr_re[m-1] : sr_re[m];
      v_im[m] = chip_load ? sr_im[m-1] : sr_im[m];
    end
    acc_re = '0;
    acc_im = '0;
    for (int m = 0; m < NCHIP; m++) begin
      if (int'(ph) + NSAMP * m < RRC_TAPS) begin
        acc_re = acc_re + AW'(v_re[m]) * AW'(RRC_COEF[int'(ph) + NSAMP * m]);
        acc_im = acc_im + AW'(v_im[m]) * AW'(RRC_COEF[int'(ph) + NSAMP * m]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < NCHIP; m++) begin
        sr_re[m] <= '0; sr_im[m] <= '0;
      end
      ph_q <= '0; x_re <= '0; x_im <= '0; x_valid <= 1'b0;
    end else begin
      x_valid <= fs_tick;
      if (fs_tick) begin
        for (int m = 0; m < NCHIP; m++) begin
          sr_re[m] <= v_re[m]; sr_im[m] <= v_im[m];
        end
        ph_q <= (ph == NSAMP - 1) ? '0 : ph + 1'b1;
        x_re <= sat(acc_re);
        x_im <= sat(acc_im);
      end
    end
  end
endmodule
