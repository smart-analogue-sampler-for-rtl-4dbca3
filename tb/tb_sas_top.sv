// tb_sas_top: end-to-end test of the Smart Analogue Sampler at its default
// sizes. The testbench plays the PMT interface and the FPGA:
//  - the three inputs carry a known pseudo-random sequence, so the expected
//    code of every cell follows from the cycle on which the trigger rose
//    (first sample on the 4th clock edge after it);
//  - the FPGA model waits for a request transition, gives readout pulses at
//    40 MHz, collects the serial record and the analogue codes, decodes the
//    record and reads 32 + 3 x 128 more cells when the record says the long
//    memory was used, then answers with an ack transition.
// Each record is checked field by field, each sample against the expected
// code of the channel selected by the amplitude class. Mechanisms counted
// (a failure for any that never happens): short record, long continuation,
// long unit busy, discarded trigger, each of the three channels, FIFO unit
// wrap-around, in-phase sync pulse, and a missing sync pulse for an
// out-of-phase re-synch.
`timescale 1ns/1ps
module tb_sas_top;
  import sas_pkg::*;
  localparam int unsigned CELLS = 32, LONG_CELLS = 128;
  localparam longint P = 100000;

  logic clk = 1'b0, rst_n = 1'b0, trigger = 0, sync_in = 0, readout_clk = 0, ack = 0;
  logic [2:0] th1 = '0;
  sample_t ain [CHANNELS];
  logic sync_ok, request, aout_valid, dout, trig_discard;
  sample_t aout;
  logic [2:0] pending;
  int checks = 0, failures = 0;

  sas_top dut (.*);

  always #2.5 clk = ~clk;

  // ---- input waveform: a fixed function of the clock count
  longint pc = 0;        // rising clock edges so far
  longint r  = 0;        // pc when reset was released
  function automatic sample_t wave(input longint n, input int ch);
    logic [31:0] h;
    h = 32'(n) * 32'd2654435761 + 32'(ch) * 32'd40503 + 32'd12345;
    return sample_t'(h >> 13);
  endfunction
  always @(posedge clk) pc <= pc + 1;
  always @(negedge clk) for (int ch = 0; ch < CHANNELS; ch++) ain[ch] = wave(pc, ch);

  function automatic logic [1:0] expected_channel(input logic [2:0] c);
    // most sensitive channel whose comparator did not fire
    for (int i = 0; i < 2; i++) if (!c[i]) return 2'(i);
    return 2'd2;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // ---- mechanism counters
  int n_short = 0, n_long = 0, n_long_busy = 0, n_discard = 0, n_wrap = 0;
  int n_ch [3] = '{0, 0, 0};
  int n_sync_ok = 0, n_sync_sent_in = 0, n_sync_sent_out = 0;
  always @(posedge clk) begin

    if (rst_n && sync_ok) n_sync_ok++;
    if (rst_n && trig_discard) n_discard++;
  end

  // ---- re-synch pulses: two in phase, one out of phase (launched 2 counts
  //      before the wrap, see the counter's synchronizer latency)
  always @(negedge clk) begin
    sync_in = 1'b0;
    if (rst_n && (pc - r) > 0) begin
      if (((pc - r) % P) == P - 2 && n_sync_sent_in < 2) begin
        sync_in = 1'b1; n_sync_sent_in++;
      end
      if ((pc - r) == P + 40000) begin
        sync_in = 1'b1; n_sync_sent_out++;
      end
    end
  end

  // ---- event bookkeeping: what the PMT interface sent
  typedef struct {
    longint at;          // pc when trigger rose
    logic [2:0] cls;
    bit status1, long_used, long_busy, status2;
    int unit;
  } ev_t;
  ev_t evq[$];

  task automatic fire(input int high, input logic [2:0] cls, input int unit,
                      input bit lu, input bit lb, input bit s2);
    ev_t e;
    @(negedge clk);
    trigger = 1; th1 = cls;
    e.at = pc; e.cls = cls; e.unit = unit;
    e.status1 = (high > 20); e.long_used = lu; e.long_busy = lb; e.status2 = s2;
    evq.push_back(e);
    fork
      begin
        repeat (high) @(negedge clk);
        trigger = 0;
      end
    join_none
  endtask

  task automatic rpulse();
    #12.5 readout_clk = 1'b1;
    #12.5 readout_clk = 1'b0;
  endtask

  // ---- FPGA model: read one record and acknowledge it
  task automatic read_record();
    logic [REC_W-1:0] bits;
    record_t rec;
    ev_t e;
    int guard = 0;
    longint t0;
    logic [1:0] ch;
    while (request == ack && guard < 20000) begin @(negedge clk); guard++; end
    check(request != ack, "request issued");
    e = evq.pop_front();
    ch = expected_channel(e.cls);
    t0 = e.at + 3;   // clock count of the first sample
    bits = '0;
    for (int k = 0; k < CELLS; k++) begin
      rpulse();
      if (k < REC_W) bits[REC_W-1-k] = dout;
      check(aout_valid && aout == wave(t0 + longint'(k), int'(ch)),
            $sformatf("fifo cell %0d ch%0d got %h want %h", k, ch, aout, wave(t0 + longint'(k), int'(ch))));
    end
    rec = bits;
    check(rec.ts == TS_WIDTH'((e.at + 2 - r) % P), $sformatf("time stamp %0d want %0d", rec.ts, (e.at + 2 - r) % P));
    check(rec.unit == UNIT_W'(e.unit), $sformatf("unit %0d want %0d", rec.unit, e.unit));
    check(rec.cls == e.cls, "class code");
    check(rec.status1 == e.status1, "status at cell 20");
    check(rec.long_used == e.long_used, "long flag");
    check(rec.long_busy == e.long_busy, "long busy flag");
    check(rec.status2 == e.status2, "second status");
    n_ch[ch]++;
    if (e.unit == 0 && e.at > 0) n_wrap++;
    if (rec.long_used) begin
      n_long++;
      for (int n = 0; n < CHANNELS * LONG_CELLS; n++) begin
        automatic int mc = n / (CHANNELS * CELLS);
        automatic int lch = (n / CELLS) % CHANNELS;
        automatic int c = mc * CELLS + n % CELLS;
        rpulse();
        check(aout_valid && aout == wave(t0 + longint'(CELLS + c), lch),
              $sformatf("long cell %0d ch%0d got %h want %h", c, lch, aout, wave(t0 + longint'(CELLS + c), lch)));
      end
    end else if (rec.long_busy) begin
      n_long_busy++;
    end else begin
      n_short++;
    end
    repeat (3) @(negedge clk);
    ack = !ack;
    repeat (6) @(negedge clk);
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ch = 0; ch < CHANNELS; ch++) ain[ch] = '0;
    rpulse();
    repeat (3) @(negedge clk);
    rst_n = 1'b1; r = pc;
    repeat (20) @(negedge clk);

    // short transients on each channel
    fire(8,  3'b000, 0, 0, 0, 0); read_record();
    fire(12, 3'b001, 1, 0, 0, 0); read_record();
    // long transient, trigger high through the second check
    fire(200, 3'b011, 2, 1, 0, 1); read_record();
    // long transient left unread, then a second one finds the long unit full
    fire(60, 3'b111, 3, 1, 0, 0);
    repeat (200) @(negedge clk);
    fire(60, 3'b001, 0, 0, 1, 0);
    repeat (100) @(negedge clk);
    read_record(); read_record();
    // fill all four units, a fifth trigger is discarded
    for (int k = 0; k < 4; k++) begin
      fire(4, 3'(k), (1 + k) % 4, 0, 0, 0);
      repeat (45) @(negedge clk);
    end
    check(pending == 4, $sformatf("four records pending (%0d)", pending));
    @(negedge clk); trigger = 1;
    repeat (4) @(negedge clk); trigger = 0;
    repeat (45) @(negedge clk);
    check(pending == 4, "discarded trigger made no record");
    repeat (4) read_record();
    check(pending == 0, "all records read");
    check(evq.size() == 0, "every event read back");

    // let the re-synch pulses pass
    while ((pc - r) < 2 * P + 100) @(negedge clk);
    check(n_sync_sent_in == 2 && n_sync_sent_out == 1, "sync pulses sent");
    check(n_sync_ok == 2, $sformatf("sync_ok pulses %0d, want 2 (one missing for the out-of-phase pulse)", n_sync_ok));

    check(n_short > 0, "short record happened");
    check(n_long > 0, "long continuation happened");
    check(n_long_busy > 0, "long unit busy happened");
    check(n_discard == 1, $sformatf("discard happened once (%0d)", n_discard));
    check(n_ch[0] > 0 && n_ch[1] > 0 && n_ch[2] > 0, "every channel selected");
    check(n_wrap > 0, "FIFO unit wrap-around happened");
    $display("mechanisms: short=%0d long=%0d long_busy=%0d discard=%0d ch=%0d/%0d/%0d wrap=%0d sync_ok=%0d",
             n_short, n_long, n_long_busy, n_discard, n_ch[0], n_ch[1], n_ch[2], n_wrap, n_sync_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
