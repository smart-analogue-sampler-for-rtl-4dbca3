// sas_analog_fifo: the four-level analogue FIFO buffer of the SAS.
//
// FIFO_UNITS macrocells, each with its own dispatched sampling clock
// (CLK1..CLK4, here the enables `wr_en[i]` with start pulses `wr_start[i]`),
// all connected to the same three inputs. The control unit fills them in
// circular order, one transient of 32 samples per unit. All units share the
// readout clock; `rd_start[i]` begins a single-channel read of unit i on the
// channel `rd_ch` chosen from the amplitude class, and `rd_next[i]` is the
// token leaving its last cell (used to continue a long transient in the
// 128-cell memory). The unit being read drives the shared output node.
module sas_analog_fifo
  import sas_pkg::*;
#(
  parameter int unsigned CELLS      = 32,
  parameter int unsigned FIFO_UNITS = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [FIFO_UNITS-1:0] wr_en,
  input  logic [FIFO_UNITS-1:0] wr_start,
  input  sample_t               ain [CHANNELS],
  input  logic                  rclk,
  input  logic [FIFO_UNITS-1:0] rd_start,
  input  logic [1:0]            rd_ch,
  output logic [FIFO_UNITS-1:0] rd_next,
  output sample_t               aout,
  output logic                  aout_oe
);

  sas_pkg::sample_t      mc_out [FIFO_UNITS];
  logic [FIFO_UNITS-1:0] mc_oe;
  logic [FIFO_UNITS-1:0] wr_next_unused;

  for (genvar i = 0; i < FIFO_UNITS; i++) begin : g_mc
    sas_macrocell #(.CELLS(CELLS)) u_mc (
      .clk     (clk),
      .rst_n   (rst_n),
      .wr_en   (wr_en[i]),
      .wr_start(wr_start[i]),
      .wr_next (wr_next_unused[i]),
      .ain     (ain),
      .rclk    (rclk),
      .rd_en   (1'b1),
      .rd_start(rd_start[i]),
      .rd_all  (1'b0),
      .rd_ch   (rd_ch),
      .rd_next (rd_next[i]),
      .aout    (mc_out[i]),
      .aout_oe (mc_oe[i])
    );
  end

  always_comb begin
    aout = '0;
    for (int i = 0; i < FIFO_UNITS; i++) if (mc_oe[i]) aout = aout | mc_out[i];
    aout_oe = |mc_oe;
  end

  logic unused_ok;
  assign unused_ok = ^wr_next_unused;

endmodule
