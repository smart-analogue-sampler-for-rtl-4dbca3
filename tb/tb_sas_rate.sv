// tb_sas_rate: event-rate workload for the full-size sampler.
// Short PMT pulses arrive at random (exponential spacing, mean 3.33 us, that
// is 300 kHz, with at least 300 ns between pulses) while an FPGA model reads
// records concurrently.
//  - Phase 1, readout clock 40 MHz: every pulse must be stored and read back
//    with the right time stamp and samples, none discarded.
//  - Phase 2, readout clock 5 MHz: a record now takes 6.4 us to read, longer
//    than the mean spacing, so the four-level buffer fills and triggers are
//    discarded; every record that was kept must still read back correctly.
`timescale 1ns/1ps
module tb_sas_rate;
  import sas_pkg::*;
  localparam int unsigned CELLS = 32;
  localparam longint P = 100000;
  localparam int N1 = 150, N2 = 60;

  logic clk = 1'b0, rst_n = 1'b0, trigger = 0, sync_in = 0, readout_clk = 0, ack = 0;
  logic [2:0] th1 = '0;
  sample_t ain [CHANNELS];
  logic sync_ok, request, aout_valid, dout, trig_discard;
  sample_t aout;
  logic [2:0] pending;
  int checks = 0, failures = 0;

  sas_top dut (.*);

  always #2.5 clk = ~clk;

  longint pc = 0, r = 0;
  function automatic sample_t wave(input longint n, input int ch);
    logic [31:0] h;
    h = 32'(n) * 32'd2246822519 + 32'(ch) * 32'd3266489917 + 32'd777;
    return sample_t'(h >> 11);
  endfunction
  always @(posedge clk) pc <= pc + 1;
  always @(negedge clk) for (int ch = 0; ch < CHANNELS; ch++) ain[ch] = wave(pc, ch);

  int discards = 0, max_pending = 0;
  always @(posedge clk) if (rst_n) begin
    if (trig_discard) discards++;
    if (int'(pending) > max_pending) max_pending = int'(pending);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  typedef struct { longint at; logic [2:0] cls; } ev_t;
  ev_t evq[$];
  real half_period = 12.5;   // readout clock half period in ns
  int  n_read = 0, n_started = 0;

  function automatic logic [1:0] expected_channel(input logic [2:0] c);
    for (int i = 0; i < 2; i++) if (!c[i]) return 2'(i);
    return 2'd2;
  endfunction

  task automatic fire(input logic [2:0] cls);
    ev_t e;
    int d0;
    @(negedge clk);
    trigger = 1; th1 = cls;
    e.at = pc; e.cls = cls;
    evq.push_back(e);
    d0 = discards;
    repeat (8) @(negedge clk);
    trigger = 0;
    if (discards != d0) void'(evq.pop_back());
  endtask

  task automatic read_record();
    logic [REC_W-1:0] bits;
    record_t rec;
    ev_t e;
    logic [1:0] ch;
    bit ok;
    e = evq.pop_front();
    n_started++;
    ch = expected_channel(e.cls);
    ok = 1;
    bits = '0;
    for (int k = 0; k < CELLS; k++) begin
      #(half_period) readout_clk = 1'b1;
      #(half_period) readout_clk = 1'b0;
      if (k < REC_W) bits[REC_W-1-k] = dout;
      if (!(aout_valid && aout == wave(e.at + 3 + longint'(k), int'(ch)))) ok = 0;
    end
    rec = bits;
    check(ok, $sformatf("samples of record %0d", n_read));
    check(rec.ts == TS_WIDTH'((e.at + 2 - r) % P) && rec.cls == e.cls && !rec.long_used,
          $sformatf("record %0d fields", n_read));
    n_read++;
    @(negedge clk);
    ack = !ack;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // FPGA model: answer every request
  initial begin
    forever begin
      @(negedge clk);
      if (request != ack) read_record();
    end
  end

  task automatic run_phase(input int n);
    for (int i = 0; i < n; i++) begin
      real u;
      int gap;
      u = real'($urandom_range(1, 1000000)) / 1.0e6;
      gap = 60 + int'(-606.0 * $ln(u));   // cycles: 300 ns + exponential, mean 3.33 us
      fire(3'($urandom_range(0, 7)));
      repeat (gap) @(negedge clk);
    end
    while (evq.size() != 0 || n_read != n_started) @(negedge clk);
    repeat (20) @(negedge clk);
  endtask

  initial begin
    int d1, r1;
    for (int ch = 0; ch < CHANNELS; ch++) ain[ch] = '0;
    #3 readout_clk = 1; #3 readout_clk = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1; r = pc;
    repeat (10) @(negedge clk);

    half_period = 12.5;    // 40 MHz
    run_phase(N1);
    d1 = discards; r1 = n_read;
    check(d1 == 0, $sformatf("40 MHz readout: %0d discards", d1));
    check(r1 == N1, $sformatf("40 MHz readout: %0d of %0d records read", r1, N1));
    $display("40 MHz: %0d records, deepest FIFO occupancy %0d", r1, max_pending);

    half_period = 100.0;   // 5 MHz
    max_pending = 0;
    run_phase(N2);
    check(discards > d1, "5 MHz readout: buffer overflow discards triggers");
    check(max_pending == 4, "5 MHz readout: buffer reached full");
    check(n_read - r1 + (discards - d1) == N2, "5 MHz readout: every pulse read or discarded");
    $display("5 MHz: %0d records read, %0d discarded", n_read - r1, discards - d1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
