// tdd_slot_timer: sample, chip and slot timing of the TDD transceiver.
//
// The whole transceiver runs on one clock at the D/A rate f_d = L_DA * fs.
// This block divides it: fs_tick is high one cycle in L_DA (a new sample at
// rate fs), chip_tick is the fs_tick that starts a chip (NC samples per
// chip), and slot_start marks the first chip_tick of every slot of
// SLOT_CHIPS chips. Slots alternate: an even slot transmits (tx_slot = 1),
// the next one receives (rx_slot = 1), as in the platform's demonstration
// set-up where one Tx slot is followed by one Rx slot. The slot length is
// the UMTS/TDD value (2560 chips) and is this design's choice. While
// enable is low the counters hold at zero and no tick is produced.
module tdd_slot_timer
  import sr_pkg::*;
#(
  parameter int L_DIV      = L_DA,
  parameter int SAMP_CHIP  = NC,
  parameter int CHIPS_SLOT = SLOT_CHIPS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  output logic fs_tick,
  output logic chip_tick,
  output logic slot_start,
  output logic tx_slot,
  output logic rx_slot
);
  logic [$clog2(L_DIV+1)-1:0]      div_q;
  logic [$clog2(SAMP_CHIP+1)-1:0]  sph_q;
  logic [$clog2(CHIPS_SLOT+1)-1:0] chip_q;
  logic                            odd_q, started_q, par_now;

  assign fs_tick    = enable && (div_q == 0);
  assign chip_tick  = fs_tick && (sph_q == 0);
  assign slot_start = chip_tick && (chip_q == 0);
  // slot parity changes exactly at each slot_start after the first one
  assign par_now    = slot_start ? (started_q && !odd_q) : odd_q;
  assign tx_slot    = enable && !par_now;
  assign rx_slot    = enable && par_now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_q <= '0; sph_q <= '0; chip_q <= '0; odd_q <= 1'b0; started_q <= 1'b0;
    end else if (!enable) begin
      div_q <= '0; sph_q <= '0; chip_q <= '0; odd_q <= 1'b0; started_q <= 1'b0;
    end else begin
      odd_q <= par_now;
      if (slot_start) started_q <= 1'b1;
      div_q <= (div_q == L_DIV - 1) ? '0 : div_q + 1'b1;
      if (fs_tick) begin
        sph_q <= (sph_q == SAMP_CHIP - 1) ? '0 : sph_q + 1'b1;
        if (sph_q == SAMP_CHIP - 1) begin
          if (chip_q == CHIPS_SLOT - 1) begin
            chip_q <= '0;
          end else begin
            chip_q <= chip_q + 1'b1;
          end
        end
      end
    end
  end
endmodule
