// rx_sample_buffer: burst memory for received A/D samples.
//
// On start it records len samples, one per fs_tick, from address 0
// upward (the fs_tick sample that comes with start is the first one), then pulses done. The same memory serves the receiver's later
// passes (channel estimation and matched filtering read it at their own
// pace through the read port) and operating mode 3, in which a recorded
// burst is read out to the host in order. The read port has one cycle of
// latency: rdata holds the word at the raddr of the previous cycle.
// Recording that the platform does in the acquisition/DSP memory is done
// here in one on-chip array; its depth is this design's choice, enough for
// one burst plus the channel tail.
// With invert set, odd-numbered samples are stored negated, i.e. the signal
// is multiplied by (-1)^n. That moves the replica at -fs/4 to +fs/4 and so
// undoes the spectrum inversion of an IF chosen as fs (l - 1/4); the
// receiver's later stages always work on the +fs/4 replica (this design's
// choice; a sign change costs nothing).
module rx_sample_buffer
  import sr_pkg::*;
#(
  parameter int DEPTH = 8192,
  parameter int W     = ADC_W,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                fs_tick,
  input  logic                start,
  input  logic                invert,
  input  logic [AW:0]         len,
  input  logic signed [W-1:0] adc_in,
  output logic                busy,
  output logic                done,
  input  logic [AW-1:0]       raddr,
  output logic signed [W-1:0] rdata
);
  logic signed [W-1:0] mem [DEPTH];
  logic [AW:0]         wcnt_q;

  function automatic logic signed [W-1:0] neg_sat(logic signed [W-1:0] a);
    return (a == {1'b1, {(W-1){1'b0}}}) ? {1'b0, {(W-1){1'b1}}} : -a;
  endfunction

  // the sample present with start (if fs_tick) is sample 0
  logic        wr_en;
  logic [AW:0] wptr;
  assign wr_en = fs_tick && (busy || (start && !busy));
  assign wptr  = busy ? wcnt_q : '0;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wptr[AW-1:0]] <= (invert && wptr[0]) ? neg_sat(adc_in) : adc_in;
    rdata <= mem[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; wcnt_q <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy   <= 1'b1;
        wcnt_q <= fs_tick ? (AW+1)'(1) : '0;
      end else if (busy && fs_tick) begin
        if (wcnt_q == len - 1'b1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        wcnt_q <= wcnt_q + 1'b1;
      end
    end
  end
endmodule
