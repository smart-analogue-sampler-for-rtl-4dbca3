// tb_sas_long_memory: self-checking test of the 128-cell memory. Writes 128
// cycles of random codes on the three channels, reads 3 x 128 cells back and
// checks the order (macrocell by macrocell, channel 1, 2, 3 inside each), the
// output enable and the pulse on which the end-of-read token appears.
module tb_sas_long_memory;
  import sas_pkg::*;
  localparam int unsigned CELLS = 32, LONG_UNITS = 4, N = CELLS * LONG_UNITS;
  logic clk = 1'b0, rclk = 1'b0, rst_n = 1'b0;
  logic wr_en = 0, wr_start = 0, rd_start = 0;
  logic rd_next, aout_oe;
  sample_t ain [CHANNELS];
  sample_t aout;
  sample_t ref_mem [CHANNELS][N];
  int checks = 0, failures = 0;

  sas_long_memory #(.CELLS(CELLS), .LONG_UNITS(LONG_UNITS)) dut (.*);

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
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ch = 0; ch < CHANNELS; ch++) ain[ch] = '0;
    rpulse();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < N; c++) begin
      @(negedge clk);
      wr_en = 1; wr_start = (c == 0);
      for (int ch = 0; ch < CHANNELS; ch++) begin
        ain[ch] = sample_t'($urandom);
        ref_mem[ch][c] = ain[ch];
      end
    end
    @(negedge clk);
    wr_en = 0;
    for (int ch = 0; ch < CHANNELS; ch++) ain[ch] = '0;
    repeat (3) @(negedge clk);
    rd_start = 1;
    for (int n = 0; n < CHANNELS * N; n++) begin
      automatic int mc = n / (CHANNELS * CELLS);
      automatic int ch = (n / CELLS) % CHANNELS;
      automatic int c  = mc * CELLS + n % CELLS;
      rpulse();
      rd_start = 0;
      #1;
      check(aout_oe && aout == ref_mem[ch][c], $sformatf("pulse %0d (mc%0d ch%0d cell%0d) got %h want %h", n, mc, ch, c, aout, ref_mem[ch][c]));
      check(rd_next == (n == CHANNELS*N-1), $sformatf("end token at pulse %0d", n));
    end
    rpulse();
    #1 check(!aout_oe, "output released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
