// sas_macrocell: one analogue memory macrocell of the SAS (3 channels x 32 cells).
//
// Writing: while the control unit dispatches the sampling clock (`wr_en`), the
// write addressing unit steps once per cycle and the three inputs are stored
// in parallel, one cell per channel, at the cell it addresses. `wr_start` is
// the serial input of that unit: the first cycle with it high writes cell 1,
// so sampling starts on the first dispatched pulse. `wr_next` is the token
// leaving cell 32 and starts the next macrocell of a chain.
//
// Reading (readout clock domain, `rclk`, stepped while `rd_en`): a pulse with
// `rd_start` high puts the read token on cell 1 and latches the read mode. In
// single-channel mode the output multiplexer connects channel `rd_ch` and 32
// pulses read its 32 cells. In all-channel mode, used for long transients,
// the token re-enters cell 1 after cell 32 while the multiplexer moves to the
// next channel, so 96 pulses read channel 1, 2 and 3 in turn. `rd_next` is
// the token leaving the last cell read, for chaining. The addressed cell is
// on `aout` after each pulse, with `aout_oe` high; otherwise the output is
// left to the other macrocells.
//
// The read order across channels and the chaining through `wr_next` /
// `rd_next` are this design's reading of the block diagram; the rest follows
// the chip description. A macrocell is single-port: its user must not write
// and read it at the same time.
module sas_macrocell
  import sas_pkg::*;
#(
  parameter int unsigned CELLS = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic        wr_start,
  output logic        wr_next,
  input  sample_t     ain [CHANNELS],
  input  logic        rclk,
  input  logic        rd_en,
  input  logic        rd_start,
  input  logic        rd_all,
  input  logic [1:0]  rd_ch,
  output logic        rd_next,
  output sample_t     aout,
  output logic        aout_oe
);

  localparam logic [1:0] LAST_CH = 2'(CHANNELS - 1);

  logic [CELLS-1:0] waddr, waddr_next;
  logic [CELLS-1:0] raddr, raddr_unused;
  logic             wr_sout, rd_sout, rd_sin;
  logic [1:0]       ch_q;
  logic             all_q;
  logic             rd_wrap;

  sas_addr_unit #(.CELLS(CELLS)) u_waddr (
    .clk      (clk),
    .rst_n    (rst_n),
    .step     (wr_en),
    .sin      (wr_start),
    .addr     (waddr),
    .addr_next(waddr_next),
    .sout     (wr_sout)
  );
  assign wr_next = wr_sout;

  // In all-channel mode the token leaving cell 32 of channel 1 or 2 comes
  // back to cell 1 while the multiplexer moves to the next channel.
  assign rd_wrap = rd_sout && all_q && (ch_q != LAST_CH);
  assign rd_sin  = rd_start || rd_wrap;
  assign rd_next = rd_sout && !rd_wrap;

  sas_addr_unit #(.CELLS(CELLS)) u_raddr (
    .clk      (rclk),
    .rst_n    (rst_n),
    .step     (rd_en),
    .sin      (rd_sin),
    .addr     (raddr),
    .addr_next(raddr_unused),
    .sout     (rd_sout)
  );

  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) begin
      ch_q  <= '0;
      all_q <= 1'b0;
    end else if (rd_en) begin
      if (rd_start) begin
        all_q <= rd_all;
        ch_q  <= rd_all ? 2'd0 : rd_ch;
      end else if (rd_wrap) begin
        ch_q  <= ch_q + 2'd1;
      end
    end
  end

  sas_cell_array #(.CELLS(CELLS)) u_cells (
    .wclk (clk),
    .we   (wr_en),
    .waddr(waddr_next),
    .din  (ain),
    .raddr(raddr),
    .rch  (ch_q),
    .ren  (1'b1),
    .dout (aout),
    .doe  (aout_oe)
  );

  // waddr is kept for visibility of the write position in simulation.
  logic unused_ok;
  assign unused_ok = ^{waddr, raddr_unused};

endmodule
