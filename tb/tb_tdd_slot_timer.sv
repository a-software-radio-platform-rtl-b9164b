// tb_tdd_slot_timer: checks tick spacing and slot alternation of the timer
// at small sizes (3 clocks per sample, 4 samples per chip, 5 chips per
// slot): fs_tick every 3 cycles, chip_tick every 12, slot_start every 60,
// tx_slot and rx_slot alternating each slot, nothing while disabled.
module tb_tdd_slot_timer;
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  logic fs_tick, chip_tick, slot_start, tx_slot, rx_slot;
  int checks = 0, failures = 0;
  tdd_slot_timer #(.L_DIV(3), .SAMP_CHIP(4), .CHIPS_SLOT(5)) dut (.*);
  always #5 clk = !clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) begin
      @(negedge clk);
      checks++; if (fs_tick || tx_slot || rx_slot) failures++;
    end
    enable = 1'b1;
    for (t = 0; t < 600; t++) begin
      #1;
      checks++;
      if (fs_tick !== (t % 3 == 0)) failures++;
      checks++;
      if (chip_tick !== (t % 12 == 0)) failures++;
      checks++;
      if (slot_start !== (t % 60 == 0)) failures++;
      checks++;
      if (tx_slot !== ((t / 60) % 2 == 0) || rx_slot !== ((t / 60) % 2 == 1)) begin
        failures++;
        if (failures < 5) $display("t=%0d tx=%b rx=%b", t, tx_slot, rx_slot);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
