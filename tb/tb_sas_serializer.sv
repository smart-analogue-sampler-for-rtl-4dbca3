// tb_sas_serializer: self-checking test of the record serializer. For several
// random records and both request levels it checks that `first` flags the
// first readout pulse, that the record comes out MSB first one bit per pulse,
// and that pulses without a new request start nothing.
module tb_sas_serializer;
  import sas_pkg::*;
  logic rclk = 1'b0, rst_n = 1'b0, request = 1'b0;
  record_t rec;
  logic first, dout;
  int checks = 0, failures = 0;

  sas_serializer dut (.*);

  task automatic pulse();
    #10 rclk = 1'b1;
    #10 rclk = 1'b0;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [REC_W-1:0] bits;
    rec = '0;
    pulse();
    #15 rst_n = 1'b1;
    #5;
    check(!first, "no request, no first");
    pulse();
    check(!first, "idle pulse");
    for (int r = 0; r < 8; r++) begin
      bits = REC_W'($urandom);
      rec = bits;
      request = !request;
      #5;
      check(first, "first after request");
      for (int k = 0; k < REC_W; k++) begin
        pulse();
        check(!first, "first only once");
        check(dout == bits[REC_W-1-k], $sformatf("record %0d bit %0d", r, k));
        rec = ~bits;  // the head may change after the load without effect
      end
      pulse();
      check(dout == 1'b0, "zero after last bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
