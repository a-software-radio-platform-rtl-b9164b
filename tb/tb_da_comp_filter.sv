// tb_da_comp_filter: up-sampling by 8 with ternary taps. fs_tick comes
// every 8 clocks with a new random sample; the 8 codes that follow must be
// h[m] * x' for m = 0..7, with the tap vector changed between runs
// (all +1, a mixed vector with zeros and minus ones, all -1).
module tb_da_comp_filter;
  import sr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, fs_tick = 1'b0;
  logic signed [15:0] xp = '0, dac_out;
  tern_t taps [8];
  int checks = 0, failures = 0;
  da_comp_filter #(.L(8), .W(16)) dut (.*);
  always #5 clk = !clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    logic signed [15:0] x;
    taps = '{default: 2'b01};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 3; run++) begin
      if (run == 1) taps = '{2'b01, 2'b00, 2'b11, 2'b01, 2'b11, 2'b00, 2'b01, 2'b01};
      if (run == 2) taps = '{default: 2'b11};
      for (int i = 0; i < 200; i++) begin
        x = 16'($urandom_range(0, 60000) - 30000);
        @(negedge clk);
        xp = x; fs_tick = 1'b1;
        @(negedge clk);
        fs_tick = 1'b0;
        for (int m = 0; m < 8; m++) begin
          e = (taps[m] == 2'b01) ? int'(x) : (taps[m] == 2'b11) ? -int'(x) : 0;
          checks++;
          if (dac_out !== 16'(e)) begin
            failures++;
            if (failures < 5) $display("run %0d m %0d got %0d exp %0d", run, m, dac_out, e);
          end
          if (m < 7) @(negedge clk);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
