// nb_decimator: narrowband path of operating mode 2.
//
// Instead of detection, the received pass-band signal is brought to base
// band, low-pass filtered and down-sampled so that its rate fits the host
// bus. The fs/4 carrier is removed by multiplying with (-j)^n, which only
// routes and negates samples (n mod 4 = 0: (r,0), 1: (0,-r), 2: (-r,0),
// 3: (0,r)). The low-pass filter is an integrate-and-dump (boxcar) over
// `dec` samples, and one complex output is produced every `dec` samples.
// The platform states only "low-pass filtering and re-sampling" with an
// arbitrary bandwidth; the boxcar and the run-time factor dec (1..255) are
// this design's choice. Output: o_valid one cycle after the fs_tick that
// completes a block; components are OW-bit sums (not normalised).
module nb_decimator
  import sr_pkg::*;
#(
  parameter int SW = ADC_W,
  parameter int OW = 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,
  input  logic                 fs_tick,
  input  logic signed [SW-1:0] r_in,
  input  logic [7:0]           dec,
  output logic                 o_valid,
  output logic signed [OW-1:0] o_re,
  output logic signed [OW-1:0] o_im
);
  logic [1:0] ph_q;
  logic [7:0] cnt_q;
  logic signed [OW-1:0] acc_re_q, acc_im_q, b_re, b_im;

  always_comb begin
    b_re = '0;
    b_im = '0;
    unique case (ph_q)
      2'd0: b_re = OW'(r_in);
      2'd1: b_im = -OW'(r_in);
      2'd2: b_re = -OW'(r_in);
      default: b_im = OW'(r_in);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_q <= '0; cnt_q <= '0; acc_re_q <= '0; acc_im_q <= '0;
      o_valid <= 1'b0; o_re <= '0; o_im <= '0;
    end else begin
      o_valid <= 1'b0;
      if (!enable) begin
        ph_q <= '0; cnt_q <= '0; acc_re_q <= '0; acc_im_q <= '0;
      end else if (fs_tick) begin
        ph_q <= ph_q + 2'd1;
        if (cnt_q + 8'd1 >= dec) begin
          o_valid  <= 1'b1;
          o_re     <= acc_re_q + b_re;
          o_im     <= acc_im_q + b_im;
          acc_re_q <= '0;
          acc_im_q <= '0;
          cnt_q    <= '0;
        end else begin
          acc_re_q <= acc_re_q + b_re;
          acc_im_q <= acc_im_q + b_im;
          cnt_q    <= cnt_q + 8'd1;
        end
      end
    end
  end
endmodule
