// if_upconverter: digital up-conversion by fs/4 without multipliers.
//
// With the sample rate chosen as fs = f_IF / (l +- 1/4), the carrier
// advances by a quarter turn per sample, so the real pass-band sample is
// x'[n] = Re{ j^(+-n) x[n] }. For the '+' sign the output cycles through
// Re x, -Im x, -Re x, Im x; for the '-' sign through Re x, Im x, -Re x, -Im x.
// Only sign changes are needed. This is the transmitter front-end of the
// platform; after the D/A converter a band-pass filter at f_IF keeps the
// replica at the IF. On every fs_tick one complex sample is taken and one
// real sample is registered (one cycle latency); the quarter-turn phase
// counter runs freely. Negation saturates (the one value -2**(W-1) becomes
// 2**(W-1)-1), a detail of this design.
module if_upconverter
  import sr_pkg::*;
#(
  parameter int W = X_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                fs_tick,
  input  logic                minus_sign,   // 1: f_IF = fs (l - 1/4)
  input  logic signed [W-1:0] x_re,
  input  logic signed [W-1:0] x_im,
  output logic signed [W-1:0] xp,
  output logic                xp_valid
);
  logic [1:0] ph_q;

  function automatic logic signed [W-1:0] neg_sat(logic signed [W-1:0] a);
    return (a == {1'b1, {(W-1){1'b0}}}) ? {1'b0, {(W-1){1'b1}}} : -a;
  endfunction

  logic signed [W-1:0] sel;
  always_comb begin
    unique case (ph_q)
      2'd0: sel = x_re;
      2'd1: sel = minus_sign ? x_im : neg_sat(x_im);
      2'd2: sel = neg_sat(x_re);
      default: sel = minus_sign ? neg_sat(x_im) : x_im;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_q <= '0; xp <= '0; xp_valid <= 1'b0;
    end else begin
      xp_valid <= fs_tick;
      if (fs_tick) begin
        ph_q <= ph_q + 2'd1;
        xp   <= sel;
      end
    end
  end
endmodule
