// sas_digital_fifo: four-level FIFO holding the digital part of event records.
//
// A record is built in place in the tail entry while its transient is being
// sampled: `alloc` writes the time stamp and analogue unit address at the
// trigger, `set_class` adds the amplitude class and the trigger status at the
// 20th cell, `set_long` adds the flags of the 128-cell unit, and `commit`
// makes the record complete and readable. Complete records leave in order:
// `head` is the oldest, `count` how many there are, and `pop` removes the
// head after its readout has been acknowledged. `head` does not change
// between pops, which keeps the record valid for the whole request / ack
// exchange. The chip builds this FIFO from self-timed latch stages; this one
// is a clocked register file with the same first-in first-out behaviour.
// Pushing into a full FIFO or popping an empty one is a usage error and is
// flagged by assertions.
module sas_digital_fifo
  import sas_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     alloc,
  input  logic [TS_WIDTH-1:0]      ts,
  input  logic [UNIT_W-1:0]        unit,
  input  logic                     set_class,
  input  logic [2:0]               cls,
  input  logic                     status1,
  input  logic                     set_long,
  input  logic                     long_used,
  input  logic                     long_busy,
  input  logic                     status2,
  input  logic                     commit,
  input  logic                     pop,
  output record_t                  head,
  output logic [$clog2(DEPTH):0]   count,
  output logic                     full
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  record_t         mem [DEPTH];
  logic [PW-1:0]   wptr, rptr;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (alloc) begin
        mem[wptr]           <= '0;
        mem[wptr].ts        <= ts;
        mem[wptr].unit      <= unit;
      end
      if (set_class) begin
        mem[wptr].cls       <= cls;
        mem[wptr].status1   <= status1;
      end
      if (set_long) begin
        mem[wptr].long_used <= long_used;
        mem[wptr].long_busy <= long_busy;
        mem[wptr].status2   <= status2;
      end
      if (commit) wptr <= inc(wptr);
      if (pop)    rptr <= inc(rptr);
      count <= count + {{PW{1'b0}}, commit} - {{PW{1'b0}}, pop};
    end
  end

  assign head = mem[rptr];
  assign full = (count == ($clog2(DEPTH)+1)'(DEPTH));

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) commit |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> (count != '0));

endmodule
