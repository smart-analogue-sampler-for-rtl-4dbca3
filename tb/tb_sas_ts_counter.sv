// tb_sas_ts_counter: self-checking test of the time-stamp counter and the
// re-synch check. The re-synch period is shortened to keep the run short.
// Checks the count sequence and wrap, that an in-phase sync pulse produces
// exactly one sync_ok pulse, and that an out-of-phase one produces none.
module tb_sas_ts_counter;
  localparam int unsigned TS_WIDTH = 17;
  localparam int unsigned PERIOD   = 50;
  logic clk = 1'b0, rst_n = 1'b0, sync_in = 1'b0;
  logic [TS_WIDTH-1:0] count;
  logic sync_ok;
  int checks = 0, failures = 0;
  int expect_cnt = 0;
  int ok_pulses = 0;

  sas_ts_counter #(.TS_WIDTH(TS_WIDTH), .SYNC_PERIOD(PERIOD)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (sync_ok) ok_pulses++;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send a one-cycle sync pulse launched when count == at
  task automatic send_sync(input int at);
    while (count != TS_WIDTH'(at)) @(negedge clk);
    sync_in = 1'b1;
    @(negedge clk);
    sync_in = 1'b0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    checks++; if (count != 0) begin failures++; $display("FAIL reset count %0d", count); end
    rst_n = 1'b1;
    for (int n = 0; n < 3 * PERIOD; n++) begin
      @(negedge clk);
      expect_cnt = (expect_cnt + 1) % PERIOD;
      checks++;
      if (count != TS_WIDTH'(expect_cnt)) begin
        failures++; $display("FAIL count %0d want %0d", count, expect_cnt);
      end
    end
    // in phase: launched 2 counts before wrap, seen at count 0 after the synchronizer
    ok_pulses = 0;
    send_sync(PERIOD - 2);
    checks++; if (ok_pulses != 1) begin failures++; $display("FAIL in-phase pulses %0d", ok_pulses); end
    // out of phase by a few counts
    ok_pulses = 0;
    send_sync(7);
    checks++; if (ok_pulses != 0) begin failures++; $display("FAIL out-of-phase pulses %0d", ok_pulses); end
    ok_pulses = 0;
    send_sync(PERIOD - 1);
    checks++; if (ok_pulses != 0) begin failures++; $display("FAIL off-by-one pulses %0d", ok_pulses); end
    ok_pulses = 0;
    send_sync(PERIOD - 2);
    checks++; if (ok_pulses != 1) begin failures++; $display("FAIL second in-phase pulses %0d", ok_pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
