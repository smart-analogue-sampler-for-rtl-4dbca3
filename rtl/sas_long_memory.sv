// sas_long_memory: the 128-cell analogue memory of the SAS.
//
// LONG_UNITS macrocells share one dispatched sampling clock (CLK5) and one
// readout clock. Their write and read addressing units are chained: the token
// leaving the last cell of one macrocell enters the first cell of the next,
// so the four behave as one 3-channel memory of LONG_UNITS x 32 cells. A
// transient longer than one FIFO unit is continued here with `wr_start` on
// the first cycle after the FIFO unit's last cell.
//
// It is always read completely: `rd_start` begins an all-channel read and
// each macrocell is read channel 1, 2, 3 before the next macrocell, 3 x 128
// pulses in all; `rd_next` is the token leaving the last cell. The output of
// the macrocell being read is driven onto `aout` with `aout_oe` high.
// Joining the four macrocells by their next-write / next-read outputs is this
// design's reading of the block diagram.
module sas_long_memory
  import sas_pkg::*;
#(
  parameter int unsigned CELLS      = 32,
  parameter int unsigned LONG_UNITS = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    wr_en,
  input  logic    wr_start,
  input  sample_t ain [CHANNELS],
  input  logic    rclk,
  input  logic    rd_start,
  output logic    rd_next,
  output sample_t aout,
  output logic    aout_oe
);

  logic [LONG_UNITS:0] wchain, rchain;
  sample_t             mc_out [LONG_UNITS];
  logic [LONG_UNITS-1:0] mc_oe;

  assign wchain[0] = wr_start;
  assign rchain[0] = rd_start;

  for (genvar i = 0; i < LONG_UNITS; i++) begin : g_mc
    sas_macrocell #(.CELLS(CELLS)) u_mc (
      .clk     (clk),
      .rst_n   (rst_n),
      .wr_en   (wr_en),
      .wr_start(wchain[i]),
      .wr_next (wchain[i+1]),
      .ain     (ain),
      .rclk    (rclk),
      .rd_en   (1'b1),
      .rd_start(rchain[i]),
      .rd_all  (1'b1),
      .rd_ch   (2'd0),
      .rd_next (rchain[i+1]),
      .aout    (mc_out[i]),
      .aout_oe (mc_oe[i])
    );
  end

  assign rd_next = rchain[LONG_UNITS];

  // The macrocell outputs share one node; at most one drives it.
  always_comb begin
    aout = '0;
    for (int i = 0; i < LONG_UNITS; i++) if (mc_oe[i]) aout = aout | mc_out[i];
    aout_oe = |mc_oe;
  end

  logic unused_ok;
  assign unused_ok = wchain[LONG_UNITS];

endmodule
