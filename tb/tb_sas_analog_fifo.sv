// tb_sas_analog_fifo: self-checking test of the four-unit analogue FIFO.
// Fills each unit in turn with a different random window, then reads the
// units back in order on different channels, checking that every unit kept
// its own samples, that only the unit being read drives the output, and the
// next-read token of each unit.
module tb_sas_analog_fifo;
  import sas_pkg::*;
  localparam int unsigned CELLS = 32, U = 4;
  logic clk = 1'b0, rclk = 1'b0, rst_n = 1'b0;
  logic [U-1:0] wr_en = '0, wr_start = '0, rd_start = '0, rd_next;
  logic [1:0] rd_ch = '0;
  logic aout_oe;
  sample_t ain [CHANNELS];
  sample_t aout;
  sample_t ref_mem [U][CHANNELS][CELLS];
  int checks = 0, failures = 0;

  sas_analog_fifo #(.CELLS(CELLS), .FIFO_UNITS(U)) dut (.*);

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
    for (int u = 0; u < U; u++) begin
      for (int c = 0; c < CELLS; c++) begin
        @(negedge clk);
        wr_en = '0; wr_start = '0;
        wr_en[u] = 1'b1; wr_start[u] = (c == 0);
        for (int ch = 0; ch < CHANNELS; ch++) begin
          ain[ch] = sample_t'($urandom);
          ref_mem[u][ch][c] = ain[ch];
        end
      end
      @(negedge clk);
      wr_en = '0; wr_start = '0;
      repeat (2) @(negedge clk);
    end
    for (int u = 0; u < U; u++) begin
      rd_ch = 2'(u % CHANNELS);
      rd_start = '0; rd_start[u] = 1'b1;
      for (int c = 0; c < CELLS; c++) begin
        rpulse();
        rd_start = '0;
        #1;
        check(aout_oe && aout == ref_mem[u][u % CHANNELS][c], $sformatf("unit %0d cell %0d got %h want %h", u, c, aout, ref_mem[u][u % CHANNELS][c]));
        check(rd_next == ((c == CELLS-1) ? (U'(1) << u) : '0), $sformatf("next read unit %0d cell %0d", u, c));
      end
    end
    rpulse();
    #1 check(!aout_oe, "output released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
