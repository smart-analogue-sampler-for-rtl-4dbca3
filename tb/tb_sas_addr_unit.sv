// tb_sas_addr_unit: self-checking test of the addressing shift register.
// Drives random step / serial-input patterns and compares the one-hot
// address, the look-ahead address and the serial output with a bit-vector
// reference kept in the testbench.
module tb_sas_addr_unit;
  localparam int unsigned CELLS = 32;
  logic clk = 1'b0, rst_n = 1'b0, step = 1'b0, sin = 1'b0;
  logic [CELLS-1:0] addr, addr_next;
  logic sout;
  logic [CELLS-1:0] ref_addr;
  int checks = 0, failures = 0;

  sas_addr_unit #(.CELLS(CELLS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: addr=%h ref=%h", what, addr, ref_addr);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_addr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // a full window: start token, then 32 pulses carry it to the end
    @(negedge clk); step = 1'b1; sin = 1'b1; #1;
    check(addr_next == 32'h1, "first pulse selects cell 1");
    @(negedge clk); sin = 1'b0; #1;
    check(addr == 32'h1, "cell 1 after first pulse");
    for (int i = 1; i < CELLS; i++) begin
      check(addr_next == (32'h1 << i), "look-ahead");
      @(negedge clk);
      check(addr == (32'h1 << i), "token walks");
    end
    check(sout == 1'b1, "sout while token in last cell");
    @(negedge clk);
    check(addr == '0 && sout == 1'b0, "token has left");
    // random traffic against the reference
    for (int n = 0; n < 2000; n++) begin
      step = 1'($urandom_range(0, 3) != 0);
      sin  = 1'($urandom_range(0, 9) == 0);
      @(posedge clk);
      if (step) ref_addr = {ref_addr[CELLS-2:0], sin};
      @(negedge clk);
      check(addr == ref_addr, "random");
      check(sout == ref_addr[CELLS-1], "random sout");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
