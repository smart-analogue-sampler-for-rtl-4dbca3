// sas_serializer: serial output of the digital event record.
//
// Runs on the readout clock from the FPGA. A readout pulse that finds
// `request` at a level it has not yet answered is the first pulse of a new
// record: `first` is high before that pulse (it also starts the read
// addressing unit of the analogue unit holding the record), and the pulse
// loads the head record. From then on `dout` carries one record bit per
// pulse, MSB first: after pulse k it shows bit REC_W-k; after the last bit it
// is 0. The record is shifted out while the first analogue cells are read,
// so the digital part adds no readout time.
//
// `request` comes from the 200 MHz domain and is sampled here directly: the
// FPGA only pulses the readout clock once it has seen the request, so the
// level and the head record are stable at those edges. Bit order and timing
// are this design's choices.
module sas_serializer
  import sas_pkg::*;
(
  input  logic    rclk,
  input  logic    rst_n,
  input  logic    request,
  input  record_t rec,
  output logic    first,
  output logic    dout
);

  logic [REC_W-1:0] sr;
  logic             req_seen;

  assign first = (request != req_seen);

  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) begin
      sr       <= '0;
      req_seen <= 1'b0;
    end else if (first) begin
      sr       <= rec;
      req_seen <= request;
    end else begin
      sr       <= {sr[REC_W-2:0], 1'b0};
    end
  end

  assign dout = sr[REC_W-1];

endmodule
