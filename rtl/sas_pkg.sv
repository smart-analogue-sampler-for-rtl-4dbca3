// sas_pkg: types and constants shared by the Smart Analogue Sampler (SAS) RTL.
//
// The digital part of an event record is a packed struct. The 17-bit time
// stamp, the analogue unit address, the 3-bit amplitude class and the trigger
// status follow the chip's description; the field order, the widths of the
// unit address and the extra flag bits for the 128-cell unit are this design's
// choice. The record is shifted out MSB first, so the time stamp leaves first.
package sas_pkg;

  localparam int unsigned TS_WIDTH  = 17;  // time-stamp counter width
  localparam int unsigned SAMPLE_W  = 10;  // code standing in for one analogue sample
  localparam int unsigned CHANNELS  = 3;   // gain channels 1:1, 1:8, 1:64
  localparam int unsigned UNIT_W    = 2;   // address of one of 4 analogue FIFO units

  typedef logic [SAMPLE_W-1:0] sample_t;

  typedef struct packed {
    logic [TS_WIDTH-1:0] ts;         // counter value at the trigger edge
    logic [UNIT_W-1:0]   unit;       // analogue FIFO unit that holds the samples
    logic [2:0]          cls;        // th1 comparator outputs at the 20th cell
    logic                status1;    // trigger (th0) level at the 20th cell
    logic                long_used;  // 128-cell unit continued the sampling
    logic                long_busy;  // continuation wanted, 128-cell unit still full
    logic                status2;    // trigger level near the end of the 128-cell unit
  } record_t;

  localparam int unsigned REC_W = $bits(record_t);

  // Channel whose samples are sent to the ADC for a given amplitude class.
  // The three th1 comparators share one threshold behind gains 1, 1/8, 1/64,
  // so a set bit means that channel left its range: read the most sensitive
  // channel whose comparator stayed low, or the 1:64 channel if all fired.
  function automatic logic [1:0] class_to_channel(input logic [2:0] cls);
    if (!cls[0])      return 2'd0;
    else if (!cls[1]) return 2'd1;
    else              return 2'd2;
  endfunction

endpackage
