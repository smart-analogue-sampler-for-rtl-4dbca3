// sas_top: Smart Analogue Sampler, a transient recorder for one photomultiplier.
//
// Three copies of the anode signal at gains 1, 1/8 and 1/64 (`ain`, each
// sample a SAMPLE_W-bit code standing for an analogue voltage) are sampled at
// the 200 MHz clock into one of four 3 x 32-cell analogue FIFO units when the
// trigger rises. Transients still above threshold at the 20th cell continue
// into a 3 x 128-cell memory. A 17-bit counter time-stamps each trigger, and
// a four-level digital FIFO keeps the record (time stamp, unit, amplitude
// class, trigger status) of each stored transient.
//
// Readout, driven by the FPGA: `request` toggles when a record is ready. Each
// `readout_clk` pulse then puts one analogue cell on `aout` (valid after the
// pulse, `aout_valid` high) and one record bit on `dout`. A short record needs
// CELLS pulses and shows only the channel picked by the amplitude class; a
// record continued in the 128-cell memory (record bit long_used) needs
// CELLS + 3 x LONG_CELLS pulses: the classified channel of the FIFO unit, then
// all three channels of each 32-cell macrocell of the long memory in turn.
// The FPGA then toggles `ack`, which frees the storage. `sync_ok` pulses when
// the shore re-synch pulse `sync_in` arrives in phase with the counter.
//
// The block structure, sizes and sequence of actions follow the chip
// description. The clocked control (the chip's is self-timed), codes in place
// of analogue voltages, the record layout and the read order are this
// design's choices. Write and read sides are in different clock domains; the
// read side only looks at control state that the two-phase handshake holds
// still while a request is open.
module sas_top
  import sas_pkg::*;
#(
  parameter int unsigned CELLS           = 32,
  parameter int unsigned FIFO_UNITS      = 4,
  parameter int unsigned LONG_UNITS      = 4,
  parameter int unsigned CHECK_CELL      = 20,
  parameter int unsigned LONG_CHECK_CELL = 116,
  parameter int unsigned DFIFO_DEPTH     = 4,
  parameter int unsigned SYNC_PERIOD     = 100000
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         trigger,
  input  logic [2:0]                   th1,
  input  sample_t                      ain [CHANNELS],
  input  logic                         sync_in,
  output logic                         sync_ok,
  input  logic                         readout_clk,
  input  logic                         ack,
  output logic                         request,
  output sample_t                      aout,
  output logic                         aout_valid,
  output logic                         dout,
  output logic                         trig_discard,
  output logic [$clog2(DFIFO_DEPTH):0] pending
);

  localparam int unsigned LONG_CELLS = LONG_UNITS * CELLS;

  logic [TS_WIDTH-1:0]   ts;
  logic [FIFO_UNITS-1:0] fifo_wr_en, fifo_wr_start, fifo_rd_start, fifo_rd_next;
  logic                  long_wr_en, long_wr_start, long_rd_start, long_rd_next;
  logic                  df_alloc, df_set_class, df_set_long, df_commit, df_pop;
  logic [UNIT_W-1:0]     df_unit;
  logic [2:0]            df_cls;
  logic                  df_status1, df_long_used, df_long_busy, df_status2, df_full;
  record_t               head;
  logic                  first;
  sample_t               fifo_aout, long_aout;
  logic                  fifo_oe, long_oe;

  sas_ts_counter #(.TS_WIDTH(TS_WIDTH), .SYNC_PERIOD(SYNC_PERIOD)) u_counter (
    .clk, .rst_n, .sync_in, .count(ts), .sync_ok
  );

  sas_control_unit #(
    .CELLS(CELLS), .CHECK_CELL(CHECK_CELL), .LONG_CELLS(LONG_CELLS),
    .LONG_CHECK_CELL(LONG_CHECK_CELL), .FIFO_UNITS(FIFO_UNITS), .DFIFO_DEPTH(DFIFO_DEPTH)
  ) u_ctrl (
    .clk, .rst_n, .trigger, .th1,
    .fifo_wr_en, .fifo_wr_start, .long_wr_en, .long_wr_start,
    .df_alloc, .df_unit, .df_set_class, .df_cls, .df_status1,
    .df_set_long, .df_long_used, .df_long_busy, .df_status2,
    .df_commit, .df_pop, .df_head(head), .df_count(pending),
    .request, .ack, .trig_discard
  );

  sas_digital_fifo #(.DEPTH(DFIFO_DEPTH)) u_dfifo (
    .clk, .rst_n,
    .alloc(df_alloc), .ts, .unit(df_unit),
    .set_class(df_set_class), .cls(df_cls), .status1(df_status1),
    .set_long(df_set_long), .long_used(df_long_used), .long_busy(df_long_busy), .status2(df_status2),
    .commit(df_commit), .pop(df_pop),
    .head, .count(pending), .full(df_full)
  );

  sas_analog_fifo #(.CELLS(CELLS), .FIFO_UNITS(FIFO_UNITS)) u_afifo (
    .clk, .rst_n,
    .wr_en(fifo_wr_en), .wr_start(fifo_wr_start), .ain,
    .rclk(readout_clk), .rd_start(fifo_rd_start), .rd_ch(class_to_channel(head.cls)),
    .rd_next(fifo_rd_next), .aout(fifo_aout), .aout_oe(fifo_oe)
  );

  sas_long_memory #(.CELLS(CELLS), .LONG_UNITS(LONG_UNITS)) u_long (
    .clk, .rst_n,
    .wr_en(long_wr_en), .wr_start(long_wr_start), .ain,
    .rclk(readout_clk), .rd_start(long_rd_start), .rd_next(long_rd_next),
    .aout(long_aout), .aout_oe(long_oe)
  );

  sas_serializer u_ser (
    .rclk(readout_clk), .rst_n, .request, .rec(head), .first, .dout
  );

  // Read side: the first readout pulse of a record starts the FIFO unit that
  // holds it; the token leaving that unit continues into the long memory when
  // the record says the transient went on there.
  always_comb begin
    fifo_rd_start = '0;
    fifo_rd_start[head.unit] = first;
    long_rd_start = fifo_rd_next[head.unit] && head.long_used;
  end

  // Shared analogue output node.
  assign aout       = fifo_oe ? fifo_aout : long_aout;
  assign aout_valid = fifo_oe || long_oe;

  a_single_driver: assert property (@(posedge readout_clk) disable iff (!rst_n) !(fifo_oe && long_oe));

  logic unused_ok;
  assign unused_ok = ^{df_full, long_rd_next};

endmodule
