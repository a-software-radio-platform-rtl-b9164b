// tb_rx_sample_buffer: records 300 random samples (fs_tick every 3 clocks,
// the first one together with start), checks busy/done timing, then
// reads back every address with one cycle of latency; a second recording
// with invert set must store odd samples negated.
module tb_rx_sample_buffer;
  logic clk = 1'b0, rst_n = 1'b0, fs_tick = 1'b0, start = 1'b0, invert = 1'b0;
  logic [9:0] len = 10'd300;
  logic signed [11:0] adc_in = '0, rdata;
  logic busy, done;
  logic [8:0] raddr = '0;
  int checks = 0, failures = 0;
  logic signed [11:0] ref_s [300];
  rx_sample_buffer #(.DEPTH(512), .W(12)) dut (.*);
  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      invert = run[0];
      for (int i = 0; i < 300; i++) begin
        @(negedge clk);
        adc_in = 12'($urandom_range(0, 4000) - 2000);
        ref_s[i] = (invert && i[0]) ? -adc_in : adc_in;
        fs_tick = 1'b1;
        start = (i == 0);
        @(negedge clk);
        fs_tick = 1'b0; start = 1'b0;
        checks++;
        if (i < 299 && !busy) failures++;
        @(negedge clk);
      end
      @(negedge clk);
      checks++;
      if (busy) failures++;
      for (int i = 0; i < 300; i++) begin
        raddr = 9'(i);
        @(negedge clk);
        checks++;
        if (rdata !== ref_s[i]) begin
          failures++;
          if (failures < 5) $display("run %0d addr %0d got %0d exp %0d", run, i, rdata, ref_s[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
