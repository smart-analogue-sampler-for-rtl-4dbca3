// tb_sas_control_unit: self-checking test of the acquisition / readout
// control, together with the digital FIFO it fills. A monitor measures every
// sampling window the unit dispatches; the test checks, against values worked
// out from the stimulus:
//  - a short transient: 32 cycles on the next unit in circular order, first
//    sample on the 4th clock edge after the trigger rises, record with time
//    stamp, unit, class and status;
//  - a long transient: 128 cycles of the long unit directly after the 32,
//    request only after the last long cell, second status bit;
//  - long unit still full: sampling stops after 32, long_busy set;
//  - all units full: the trigger is discarded;
//  - trigger edges during an acquisition are ignored;
//  - two-phase request / ack: one request per record, storage freed on ack.
module tb_sas_control_unit;
  import sas_pkg::*;
  localparam int unsigned CELLS = 32, LONG_CELLS = 128, U = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic trigger = 0, ack = 0;
  logic [2:0] th1 = '0;
  logic [TS_WIDTH-1:0] ts = '0;
  logic [U-1:0] fifo_wr_en, fifo_wr_start;
  logic long_wr_en, long_wr_start;
  logic df_alloc, df_set_class, df_set_long, df_commit, df_pop, df_full;
  logic [UNIT_W-1:0] df_unit;
  logic [2:0] df_cls;
  logic df_status1, df_long_used, df_long_busy, df_status2;
  record_t head;
  logic [2:0] count;
  logic request, trig_discard;
  int checks = 0, failures = 0;

  sas_control_unit #(.CELLS(CELLS), .LONG_CELLS(LONG_CELLS)) dut (
    .clk, .rst_n, .trigger, .th1,
    .fifo_wr_en, .fifo_wr_start, .long_wr_en, .long_wr_start,
    .df_alloc, .df_unit, .df_set_class, .df_cls, .df_status1,
    .df_set_long, .df_long_used, .df_long_busy, .df_status2,
    .df_commit, .df_pop, .df_head(head), .df_count(count),
    .request, .ack, .trig_discard
  );

  sas_digital_fifo #(.DEPTH(4)) u_fifo (
    .clk, .rst_n, .alloc(df_alloc), .ts, .unit(df_unit),
    .set_class(df_set_class), .cls(df_cls), .status1(df_status1),
    .set_long(df_set_long), .long_used(df_long_used), .long_busy(df_long_busy), .status2(df_status2),
    .commit(df_commit), .pop(df_pop), .head, .count, .full(df_full)
  );

  always #5 clk = ~clk;

  // ---- monitor of the dispatched sampling windows
  longint cyc = 0;
  int     run_len [U];
  int     last_len [U];
  longint first_start [U];
  int     long_run = 0, last_long_len = 0;
  longint last_fifo_cycle = 0, long_first_cycle = 0;
  int     discards = 0, requests = 0;
  logic   req_d = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    ts  <= ts + 1'b1;
    if (rst_n) begin
      if ($countones(fifo_wr_en) + int'(long_wr_en) > 1) begin
        failures++; $display("FAIL two sampling windows at once");
      end
      for (int u = 0; u < U; u++) begin
        if (fifo_wr_en[u]) begin
          if (fifo_wr_start[u]) first_start[u] = cyc;
          run_len[u] = run_len[u] + 1;
          last_fifo_cycle = cyc;
        end else if (run_len[u] != 0) begin
          last_len[u] = run_len[u];
          run_len[u] = 0;
        end
      end
      if (long_wr_en) begin
        if (long_wr_start) long_first_cycle = cyc;
        long_run++;
      end else if (long_run != 0) begin
        last_long_len = long_run;
        long_run = 0;
      end
      if (trig_discard) discards++;
      if (request != req_d) requests++;
      req_d <= request;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Trigger rising at a negedge; `high` cycles later it falls. Returns the
  // cycle count and time stamp at the moment the trigger was raised.
  task automatic fire(input int high, input logic [2:0] cls, output longint at, output logic [TS_WIDTH-1:0] ts_at);
    @(negedge clk);
    trigger = 1; th1 = cls; at = cyc; ts_at = ts;
    fork
      begin
        repeat (high) @(negedge clk);
        trigger = 0;
      end
    join_none
  endtask

  // Wait for an open request, check the head record, acknowledge it.
  task automatic take(input record_t want, input string what);
    int guard = 0;
    while (request == ack && guard < 1000) begin @(negedge clk); guard++; end
    check(request != ack, {what, ": request issued"});
    check(head == want, $sformatf("%s: record %p want %p", what, head, want));
    repeat (7) @(negedge clk);
    ack = !ack;
    repeat (6) @(negedge clk);
  endtask

  task automatic wait_idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  longint at;
  logic [TS_WIDTH-1:0] ts_at;
  record_t want;

  initial begin
    for (int u = 0; u < U; u++) begin run_len[u] = 0; last_len[u] = 0; first_start[u] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);

    // 1. short transient on unit 0, class 3'b001 (channel 2 would be read)
    fire(10, 3'b001, at, ts_at);
    wait_idle(60);
    check(last_len[0] == CELLS, $sformatf("short window length %0d", last_len[0]));
    check(first_start[0] - at == 3, $sformatf("trigger to first sample %0d", first_start[0] - at));
    check(last_long_len == 0, "no long window for a short transient");
    want = '0; want.ts = ts_at + 2; want.unit = 0; want.cls = 3'b001;
    take(want, "short");
    check(requests == 1, "one request per record");

    // 2. long transient on unit 1; trigger held past cell 116
    fire(200, 3'b011, at, ts_at);
    wait_idle(40);
    check(request == ack, "no request before the long unit ends");
    wait_idle(160);
    check(last_len[1] == CELLS, "first 32 cells in unit 1");
    check(last_long_len == LONG_CELLS, $sformatf("long window length %0d", last_long_len));
    check(long_first_cycle == first_start[1] + CELLS, "long window follows without a gap");
    want = '0; want.ts = ts_at + 2; want.unit = 1; want.cls = 3'b011;
    want.status1 = 1; want.long_used = 1; want.status2 = 1;
    take(want, "long");

    // 3. long transient with the trigger dropping before cell 116; not acked
    fire(60, 3'b111, at, ts_at);
    wait_idle(200);
    check(last_long_len == LONG_CELLS, "second long window");
    want = '0; want.ts = ts_at + 2; want.unit = 2; want.cls = 3'b111;
    want.status1 = 1; want.long_used = 1; want.status2 = 0;
    // 4. while the long unit is still full: sampling stops after 32 cells
    last_long_len = 0;
    fire(60, 3'b000, at, ts_at);
    wait_idle(200);
    check(last_len[3] == CELLS, "unit 3 sampled 32 cells");
    check(last_long_len == 0, "long unit not used while full");
    take(want, "long, status2 low");
    want = '0; want.ts = ts_at + 2; want.unit = 3; want.cls = 3'b000;
    want.status1 = 1; want.long_busy = 1;
    take(want, "long unit busy");

    // 5. edges during an acquisition are ignored
    fire(3, 3'b000, at, ts_at);
    wait_idle(8);
    fire(3, 3'b000, at, ts_at);      // falls inside the first window
    wait_idle(60);
    check(last_len[0] == CELLS, "unit 0 again, one window");
    check(last_len[1] == CELLS && run_len[1] == 0, "no second window started");
    want = '0; want.unit = 0; want.ts = head.ts;
    take(want, "after ignored edge");

    // 6. fill all four units without reading, fifth trigger discarded
    for (int k = 0; k < 4; k++) begin
      fire(3, 3'b000, at, ts_at);
      wait_idle(45);
    end
    check(count == 4, $sformatf("four records pending (%0d)", count));
    check(discards == 0, "no discard yet");
    fire(3, 3'b000, at, ts_at);
    wait_idle(45);
    check(discards == 1, "fifth trigger discarded");
    check(count == 4, "still four records");
    for (int k = 0; k < 4; k++) begin
      want = '0; want.unit = UNIT_W'(k + 1); want.ts = head.ts;
      take(want, "drain");
    end
    check(count == 0, "drained");
    // storage is free again
    fire(3, 3'b010, at, ts_at);
    wait_idle(45);
    want = '0; want.ts = ts_at + 2; want.unit = 1; want.cls = 3'b010;
    take(want, "after drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
