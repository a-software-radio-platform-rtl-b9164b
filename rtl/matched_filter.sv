// matched_filter: pass-band matched filter evaluated at symbol instants only.
//
// The received signal r is real and centred at fs/4, and the filter f is
// the analytic pass-band response, so v[k] = sum_m r[k+m] conj(f[m]) keeps
// the wanted replica. At the symbol instants k = k0 + j*N*NSAMP the
// pass-band rotation j^k is 1 (N*NSAMP is a multiple of 4 and k0 is chosen
// so), hence v[k] is directly the symbol estimate: no demodulation is done.
// Only these instants are computed. NSP symbols are worked on together:
// for a group starting at symbol j0 the samples r[k0 + j0*stride + t],
// t = 0 .. flen + (NSP-1)*stride - 1, are read once each, and lane p adds
// r * conj(f[t - p*stride]) while that tap lies inside the filter. Each lane
// has its own filter read port. After the group the NSP results leave one
// per clock on v_valid with their index v_idx (lanes past nsym are
// dropped). On start, nsym symbols are produced from sample address k0.
// Timing: a group takes flen + (NSP-1)*stride + 1 + NSP clocks; memories are
// read with one cycle of latency. The result is shifted right by VSH and
// saturated to V_W bits. The filter and the sub-sampling rule are the
// platform's; the lanes, the scaling and the timing are this design's
// choice.
module matched_filter
  import sr_pkg::*;
#(
  parameter int AW  = 13,
  parameter int FA  = 9,
  parameter int SW  = ADC_W,
  parameter int VSH = 8,
  parameter int NSP = 4               // symbols computed in parallel
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [AW-1:0]         k0,
  input  logic [AW-1:0]         stride,
  input  logic [8:0]            nsym,
  input  logic [FA:0]           flen,
  output logic                  busy,
  output logic                  done,
  output logic [AW-1:0]         s_raddr,
  input  logic signed [SW-1:0]  s_rdata,
  output logic [FA-1:0]         f_raddr [NSP],
  input  logic signed [F_W-1:0] f_re [NSP],
  input  logic signed [F_W-1:0] f_im [NSP],
  output logic                  v_valid,
  output logic [8:0]            v_idx,
  output logic signed [V_W-1:0] v_re,
  output logic signed [V_W-1:0] v_im
);
  localparam int EW = $clog2(NSP + 1);
  typedef enum logic [1:0] {M_IDLE, M_RUN, M_FLUSH, M_EMIT} st_e;
  st_e st_q;

  logic [AW-1:0]      kb_q;      // sample address of the group's first instant
  logic [AW:0]        t_q;       // sample offset inside the group window
  logic [AW:0]        tlen;      // window length
  logic [8:0]         j0_q;      // first symbol of the group
  logic [EW-1:0]      e_q;       // emission lane
  logic [NSP-1:0]     vb_q;      // lane products valid in stage B
  logic signed [63:0] acc_re_q [NSP];
  logic signed [63:0] acc_im_q [NSP];
  logic [NSP-1:0]     in_f;

  assign tlen    = (AW+1)'(flen) + (AW+1)'(NSP - 1) * (AW+1)'(stride);
  assign s_raddr = kb_q + AW'(t_q);

  // tap of lane p for the sample being read
  always_comb begin
    for (int p = 0; p < NSP; p++) begin
      logic [AW+1:0] off, m;
      off        = (AW+2)'(p) * (AW+2)'(stride);
      m          = (AW+2)'(t_q) - off;
      in_f[p]    = (AW+2)'(t_q) >= off && m < (AW+2)'(flen);
      f_raddr[p] = FA'(m);
    end
  end

  function automatic logic signed [V_W-1:0] sat_v(logic signed [63:0] a);
    if (a > 64'(2 ** (V_W - 1) - 1))  return {1'b0, {(V_W-1){1'b1}}};
    else if (a < -64'(2 ** (V_W - 1))) return {1'b1, {(V_W-1){1'b0}}};
    else                               return V_W'(a);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= M_IDLE; kb_q <= '0; t_q <= '0; j0_q <= '0; e_q <= '0; vb_q <= '0;
      for (int p = 0; p < NSP; p++) begin acc_re_q[p] <= '0; acc_im_q[p] <= '0; end
      busy <= 1'b0; done <= 1'b0;
      v_valid <= 1'b0; v_idx <= '0; v_re <= '0; v_im <= '0;
    end else begin
      done    <= 1'b0;
      v_valid <= 1'b0;
      vb_q    <= '0;
      for (int p = 0; p < NSP; p++)
        if (vb_q[p]) begin
          acc_re_q[p] <= acc_re_q[p] + 64'(s_rdata) * 64'(f_re[p]);
          acc_im_q[p] <= acc_im_q[p] - 64'(s_rdata) * 64'(f_im[p]);
        end
      unique case (st_q)
        M_IDLE: if (start) begin
          busy <= 1'b1; st_q <= M_RUN; kb_q <= k0; t_q <= '0; j0_q <= '0;
          for (int p = 0; p < NSP; p++) begin acc_re_q[p] <= '0; acc_im_q[p] <= '0; end
        end
        M_RUN: begin
          vb_q <= in_f;
          if (t_q == tlen - 1'b1) st_q <= M_FLUSH;
          else                    t_q  <= t_q + 1'b1;
        end
        // the last products accumulate in this cycle
        M_FLUSH: begin
          e_q  <= '0;
          st_q <= M_EMIT;
        end
        M_EMIT: begin
          if (int'(j0_q) + int'(e_q) < int'(nsym)) begin
            v_valid <= 1'b1;
            v_idx   <= j0_q + 9'(e_q);
            v_re    <= sat_v(acc_re_q[e_q] >>> VSH);
            v_im    <= sat_v(acc_im_q[e_q] >>> VSH);
          end
          e_q <= e_q + 1'b1;
          if (e_q == EW'(NSP - 1)) begin
            if (int'(j0_q) + NSP >= int'(nsym)) begin
              st_q <= M_IDLE; busy <= 1'b0; done <= 1'b1;
            end else begin
              j0_q <= j0_q + 9'(NSP);
              kb_q <= kb_q + AW'(NSP) * stride;
              t_q  <= '0;
              for (int p = 0; p < NSP; p++) begin acc_re_q[p] <= '0; acc_im_q[p] <= '0; end
              st_q <= M_RUN;
            end
          end
        end
        default: st_q <= M_IDLE;
      endcase
    end
  end
endmodule
