// sas_ts_counter: 17-bit time-stamp counter and re-synchronisation check.
//
// The counter runs on the 200 MHz clock from reset and gives the time stamp
// copied into each event record. The shore sends a re-synch pulse every
// 500 us; at 200 MHz that is 100 000 cycles, so the counter counts modulo
// SYNC_PERIOD = 100 000, which fits the 17 bits of the chip. `sync_in` passes
// a two-flop synchronizer; when its rising edge is seen while the counter is
// at 0, `sync_ok` pulses for one cycle. A missing pulse tells the FPGA that
// timing was lost in that interval. The counter width and the 500 us interval
// follow the chip description; counting modulo 100 000 and "in phase" meaning
// "edge seen at count 0" are this design's choices. Because of the
// synchronizer, a sync_in edge launched at count SYNC_PERIOD-2 is the one seen
// at count 0.
module sas_ts_counter #(
  parameter int unsigned TS_WIDTH    = 17,
  parameter int unsigned SYNC_PERIOD = 100000
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sync_in,
  output logic [TS_WIDTH-1:0] count,
  output logic                sync_ok
);

  logic [2:0] sync_sr;
  logic       sync_rise;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= '0;
      sync_sr <= '0;
      sync_ok <= 1'b0;
    end else begin
      count   <= (count == TS_WIDTH'(SYNC_PERIOD - 1)) ? '0 : count + 1'b1;
      sync_sr <= {sync_sr[1:0], sync_in};
      sync_ok <= sync_rise && (count == '0);
    end
  end

  assign sync_rise = sync_sr[1] && !sync_sr[2];

endmodule
