// tb_sas_digital_fifo: self-checking test of the four-level record FIFO.
// Records are built in steps (alloc, set_class, set_long, commit) the way the
// control unit builds them, while pops remove records at random. A queue in
// the testbench is the reference for head and count; the FIFO is driven up
// to full and back to empty.
module tb_sas_digital_fifo;
  import sas_pkg::*;
  localparam int unsigned DEPTH = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic alloc = 0, set_class = 0, set_long = 0, commit = 0, pop = 0;
  logic [TS_WIDTH-1:0] ts = '0;
  logic [UNIT_W-1:0] unit = '0;
  logic [2:0] cls = '0;
  logic status1 = 0, long_used = 0, long_busy = 0, status2 = 0;
  record_t head;
  logic [$clog2(DEPTH):0] count;
  logic full;
  record_t q[$];
  record_t build;
  int checks = 0, failures = 0, max_count = 0;

  sas_digital_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle_ops();
    alloc = 0; set_class = 0; set_long = 0; commit = 0; pop = 0;
  endtask

  // one clock with the given operations; pop at random if a record is there
  task automatic cycle(input bit do_pop_ok);
    pop = do_pop_ok && (q.size() > 0) && ($urandom_range(0, 2) == 0);
    @(posedge clk);
    if (pop) void'(q.pop_front());
    if (commit) q.push_back(build);
    @(negedge clk);
    idle_ops();
    checks++;
    if (count != ($clog2(DEPTH)+1)'(q.size())) begin
      failures++; $display("FAIL count %0d want %0d", count, q.size());
    end
    if (q.size() > max_count) max_count = q.size();
    if (q.size() > 0) begin
      checks++;
      if (head != q[0]) begin failures++; $display("FAIL head %h want %h", head, q[0]); end
    end
    checks++;
    if (full != (q.size() == DEPTH)) begin failures++; $display("FAIL full flag"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 60; r++) begin
      // phases: fill fast for the first records, then balanced
      automatic bit pops = (r >= 6);
      while (q.size() == DEPTH) cycle(1'b1);
      build = '0;
      build.ts = TS_WIDTH'($urandom); build.unit = UNIT_W'(r);
      alloc = 1; ts = build.ts; unit = build.unit;
      cycle(pops);
      build.cls = 3'($urandom); build.status1 = 1'($urandom);
      set_class = 1; cls = build.cls; status1 = build.status1;
      cycle(pops);
      if ($urandom_range(0, 1) == 1) begin
        build.long_used = 1'($urandom); build.long_busy = 1'($urandom); build.status2 = 1'($urandom);
        set_long = 1; long_used = build.long_used; long_busy = build.long_busy; status2 = build.status2;
        cycle(pops);
      end
      commit = 1;
      cycle(pops);
    end
    while (q.size() > 0) cycle(1'b1);
    checks++;
    if (max_count != DEPTH) begin failures++; $display("FAIL never reached full (%0d)", max_count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
