// burst_builder: chip stream of one transmit burst, summed over the users.
//
// Each user u sends, in the same burst, a training part and a data part:
//  * training: P_LEN + M_LEN chips of the common base sequence a[0..M-1],
//    cyclically shifted by u*Q_LEN chips, so that chip c carries
//    a[(c - P_LEN - u*Q_LEN) mod M_LEN]. The first P_LEN chips are the cyclic
//    prefix that makes the M_LEN-chip window seen by the receiver a circular
//    convolution, which the channel estimator relies on.
//  * data: D_CHIPS chips of direct-sequence spread QPSK,
//    chip = b[floor(k/N)] * s[k mod N], with spreading gain N = 4, 8 or 16
//    (sf input) and the user's code s. With bpsk set, bit 0 of each data
//    symbol goes on both rails, b = +-(1+j) (this design's BPSK mapping).
// The outputs of all enabled users are added, giving chips whose components
// lie in -U..U. Chips are coded as two sign bits (bit 0 = real part
// negative, bit 1 = imaginary part negative); a code bit of 1 means -1.
// The training memory, the data-symbol memory and the codes are written by
// the host. The spreading rule and cyclic-shift training follow the
// platform; the training-before-data burst layout, the lengths and the
// memories' organisation are this design's choice.
// Timing: start (with chip_en) begins a burst; every chip_en afterwards
// presents the next chip in registered outputs; busy falls after the last
// chip, and the output returns to zero so the pulse shaper sees silence.
module burst_builder
  import sr_pkg::*;
#(
  parameter int U       = U_MAX,
  parameter int M_LEN   = M_TRAIN,
  parameter int Q_LEN   = Q_CHAN,
  parameter int P_LEN   = P_PREFIX,
  parameter int D_CHIPS = DATA_CHIPS,
  parameter int CW      = 3           // chip component width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // host writes
  input  logic                 train_we,
  input  logic [9:0]           train_addr,
  input  logic [1:0]           train_data,
  input  logic                 sym_we,
  input  logic [$clog2(U)-1:0] sym_user,
  input  logic [7:0]           sym_addr,
  input  logic [1:0]           sym_data,
  input  logic                 bpsk,        // data bit 0 sent on both rails
  input  logic [SF_MAX-1:0]    code [U],
  input  logic [U-1:0]         user_en,
  input  sf_e                  sf,
  // burst
  input  logic                 chip_en,
  input  logic                 start,
  output logic                 busy,
  output logic signed [CW-1:0] chip_re,
  output logic signed [CW-1:0] chip_im
);
  localparam int BURST = P_LEN + M_LEN + D_CHIPS;

  logic [1:0] train_mem [M_LEN];
  logic [1:0] sym_mem   [U][256];

  logic [$clog2(BURST+1)-1:0] c_q;             // chip index in the burst
  logic [$clog2(M_LEN+1)-1:0] tidx_q [U];      // training index per user
  logic [7:0]                 j_q;             // data symbol index
  logic [4:0]                 i_q;             // chip index in the symbol
  logic [4:0]                 n_sf;

  assign n_sf = 5'(sf_value(sf));

  always_ff @(posedge clk) begin
    if (train_we) train_mem[train_addr[$clog2(M_LEN)-1:0]] <= train_data;
    if (sym_we)   sym_mem[sym_user][sym_addr] <= sym_data;
  end

  // chip of the current index, summed over users
  logic signed [CW-1:0] sum_re, sum_im;
  logic [1:0]           bits;
  always_comb begin
    sum_re = '0;
    sum_im = '0;
    for (int u = 0; u < U; u++) begin
      if (c_q < P_LEN + M_LEN) begin
        bits = train_mem[tidx_q[u]];
      end else begin
        bits = (bpsk ? {2{sym_mem[u][j_q][0]}} : sym_mem[u][j_q]) ^ {2{code[u][i_q[3:0]]}};
      end
      if (user_en[u]) begin
        sum_re = bits[0] ? sum_re - CW'(1) : sum_re + CW'(1);
        sum_im = bits[1] ? sum_im - CW'(1) : sum_im + CW'(1);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; c_q <= '0; j_q <= '0; i_q <= '0;
      chip_re <= '0; chip_im <= '0;
      for (int u = 0; u < U; u++) tidx_q[u] <= '0;
    end else if (chip_en) begin
      if (start) begin
        busy <= 1'b1;
        c_q  <= '0;
        j_q  <= '0;
        i_q  <= '0;
        for (int u = 0; u < U; u++)
          tidx_q[u] <= ($clog2(M_LEN+1))'((2*M_LEN - P_LEN - u*Q_LEN) % M_LEN);
        chip_re <= '0;
        chip_im <= '0;
      end else if (busy) begin
        chip_re <= sum_re;
        chip_im <= sum_im;
        for (int u = 0; u < U; u++)
          tidx_q[u] <= (tidx_q[u] == M_LEN - 1) ? '0 : tidx_q[u] + 1'b1;
        if (c_q >= P_LEN + M_LEN) begin
          if (i_q == n_sf - 1) begin
            i_q <= '0;
            j_q <= j_q + 1'b1;
          end else begin
            i_q <= i_q + 1'b1;
          end
        end
        if (c_q == BURST - 1) busy <= 1'b0;
        c_q <= c_q + 1'b1;
      end else begin
        chip_re <= '0;
        chip_im <= '0;
      end
    end
  end
endmodule
