// da_comp_filter: up-sampler and ternary FIR in front of the D/A converter.
//
// The D/A converter runs at f_d = L_DA * fs so that the IF replica falls in
// the main lobe of its sinc response. The fs-rate pass-band signal x'[k] is
// up-sampled by L_DA (zero insertion) and filtered by an L_DA-tap FIR h
// whose taps are 0, +1 or -1. Because the filter is exactly as long as the
// up-sampling factor, only one product is non-zero per output:
// x'''[n] = h[n mod L_DA] * x'[floor(n/L_DA)], i.e. each input sample is
// repeated L_DA times with the sign pattern h. That is the platform's
// structure; the tap set is chosen by the host (an exhaustive search over
// the 3**L_DA vectors), it is a run-time input here.
// Timing: the held sample is replaced on fs_tick (which must come once every
// L_DA cycles); the output register produces one D/A code per clock, the
// first one (tap 0) in the cycle after fs_tick.
module da_comp_filter
  import sr_pkg::*;
#(
  parameter int L = L_DA,
  parameter int W = X_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                fs_tick,
  input  logic signed [W-1:0] xp,
  input  tern_t               taps [L],
  output logic signed [W-1:0] dac_out
);
  logic [$clog2(L+1)-1:0] m_q;
  logic signed [W-1:0]    hold_q;
  logic signed [W-1:0]    cur;
  logic [$clog2(L+1)-1:0] m_cur;
  tern_t                  t;

  always_comb begin
    cur   = fs_tick ? xp : hold_q;
    m_cur = fs_tick ? '0 : m_q;
    t     = taps[m_cur];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_q <= '0; hold_q <= '0; dac_out <= '0;
    end else begin
      if (fs_tick) hold_q <= xp;
      m_q <= (m_cur == L - 1) ? '0 : m_cur + 1'b1;
      unique case (t)
        2'b01:   dac_out <= cur;
        2'b11:   dac_out <= (cur == {1'b1, {(W-1){1'b0}}}) ? {1'b0, {(W-1){1'b1}}} : -cur;
        default: dac_out <= '0;
      endcase
    end
  end
endmodule
