// carrier_sync: decision-directed carrier phase tracking and QPSK/BPSK decisions.
//
// Works at symbol rate on the matched-filter outputs. Each symbol estimate
// v is turned back by the current phase estimate phi (CORDIC rotation),
// y = v e^{-j phi}; the QPSK decision d takes the signs of y. With bpsk
// set the symbols lie on the diagonal, d = b(1+j), and the decision is the
// sign of Re y + Im y, returned as two equal bits. The phase
// error is the angle of y conj(d) (CORDIC vectoring), which phi follows
// with step size 2**-MU_SH: phi <- phi + e / 2**MU_SH. clear resets phi to
// zero at the start of a burst (the channel estimate already removes the
// static phase). The outputs are registered one cycle after v_valid: the
// BPSK on the diagonal is this design's choice (the transmitter sends it
// so). The decided bits (bit 0 = real part negative, bit 1 = imaginary part
// negative, the transmit coding), the derotated y, and the error e.
// The decision-directed principle is the platform's; the CORDIC phase
// detector and the first-order loop are this design's choice.
module carrier_sync
  import sr_pkg::*;
#(
  parameter int MU_SH = 3
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  bpsk,
  input  logic                  v_valid,
  input  logic signed [V_W-1:0] v_re,
  input  logic signed [V_W-1:0] v_im,
  output logic                  d_valid,
  output logic [1:0]            d_bits,
  output logic signed [V_W-1:0] y_re,
  output logic signed [V_W-1:0] y_im,
  output logic signed [31:0]    phase_err,
  output logic [31:0]           phase
);
  localparam int CW = V_W + 2;
  logic signed [CW-1:0] yr, yi, er, ei, mag;
  logic [31:0] rz, ez;
  logic dre, dim;
  logic signed [CW:0] ysum;

  cordic #(.W(CW), .ITER(18)) u_rot (
    .vectoring(1'b0), .x_in(CW'(v_re)), .y_in(CW'(v_im)), .z_in(32'd0 - phase),
    .x_out(yr), .y_out(yi), .z_out(rz));

  // y conj(d), d = (+-1) + j(+-1)
  assign ysum = (CW+1)'(yr) + (CW+1)'(yi);
  assign dre  = bpsk ? ysum < 0 : yr < 0;
  assign dim  = bpsk ? ysum < 0 : yi < 0;
  assign er  = (dre ? -yr : yr) + (dim ? -yi : yi);
  assign ei  = (dre ? -yi : yi) - (dim ? -yr : yr);

  cordic #(.W(CW), .ITER(18)) u_vec (
    .vectoring(1'b1), .x_in(er >>> 1), .y_in(ei >>> 1), .z_in(32'd0),
    .x_out(mag), .y_out(), .z_out(ez));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0; d_valid <= 1'b0; d_bits <= '0; y_re <= '0; y_im <= '0; phase_err <= '0;
    end else begin
      d_valid <= v_valid;
      if (clear) begin
        phase <= '0;
      end else if (v_valid) begin
        d_bits    <= {dim, dre};
        y_re      <= V_W'(yr);
        y_im      <= V_W'(yi);
        phase_err <= $signed(ez);
        phase     <= phase + 32'($signed(ez) >>> MU_SH);
      end
    end
  end
endmodule
