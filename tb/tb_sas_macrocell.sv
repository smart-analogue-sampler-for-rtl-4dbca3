// tb_sas_macrocell: self-checking test of one analogue memory macrocell.
// Writes a 32-sample window of random codes on all three channels, then
// reads it back in single-channel mode for each channel and in all-channel
// mode, checking every output value, the output enable, and the cycle on
// which the next-write and next-read tokens appear.
module tb_sas_macrocell;
  import sas_pkg::*;
  localparam int unsigned CELLS = 32;
  logic clk = 1'b0, rclk = 1'b0, rst_n = 1'b0;
  logic wr_en = 0, wr_start = 0, rd_start = 0, rd_all = 0;
  logic [1:0] rd_ch = '0;
  logic wr_next, rd_next, aout_oe;
  sample_t ain [CHANNELS];
  sample_t aout;
  sample_t ref_mem [CHANNELS][CELLS];
  int checks = 0, failures = 0;

  sas_macrocell #(.CELLS(CELLS)) dut (.rd_en(1'b1), .*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic rpulse();
    #20 rclk = 1'b1;
    #20 rclk = 1'b0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_window();
    for (int c = 0; c < CELLS; c++) begin
      @(negedge clk);
      wr_en = 1; wr_start = (c == 0);
      for (int ch = 0; ch < CHANNELS; ch++) begin
        ain[ch] = sample_t'($urandom);
        ref_mem[ch][c] = ain[ch];
      end
    end
    @(negedge clk);
    wr_en = 0; wr_start = 0;
    check(wr_next, "next write after cell 32");
    // idle cycles with no clock dispatched do not write
    for (int ch = 0; ch < CHANNELS; ch++) ain[ch] = '1;
    repeat (3) @(negedge clk);
  endtask

  task automatic read_channel(input int ch);
    rd_all = 0; rd_ch = 2'(ch); rd_start = 1;
    for (int c = 0; c < CELLS; c++) begin
      rpulse();
      rd_start = 0;
      #1;
      check(aout_oe && aout == ref_mem[ch][c], $sformatf("ch%0d cell%0d got %h want %h", ch, c, aout, ref_mem[ch][c]));
      check(rd_next == (c == CELLS-1), "next read in single-channel mode");
    end
    rpulse();  // token leaves
    #1 check(!aout_oe, "output released after token left");
  endtask

  initial begin
    for (int ch = 0; ch < CHANNELS; ch++) ain[ch] = '0;
    rpulse();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    #1 check(!aout_oe, "idle output open");
    write_window();
    for (int ch = 0; ch < CHANNELS; ch++) read_channel(ch);
    // all-channel read: 96 pulses, channel 1, 2, 3
    rd_all = 1; rd_start = 1;
    for (int n = 0; n < CHANNELS * CELLS; n++) begin
      rpulse();
      rd_start = 0;
      #1;
      check(aout_oe && aout == ref_mem[n / CELLS][n % CELLS], $sformatf("all-mode pulse %0d", n));
      check(rd_next == (n == CHANNELS*CELLS-1), $sformatf("next read in all-channel mode at %0d", n));
    end
    rpulse();
    // second window overwrites the first
    write_window();
    read_channel(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
