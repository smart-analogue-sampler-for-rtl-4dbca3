// sas_cell_array: behavioural model of the 3 x 32 switched-capacitor cells of
// one macrocell, with their bank amplifiers and output switches.
//
// This is a behavioural model, not a circuit: each storage capacitor is held
// as a SAMPLE_W-bit code of the voltage it would store. On a write strobe the
// three inputs are stored in parallel in the cell selected by the one-hot
// write address, one cell per channel. For reading, the one-hot read address
// and the channel select pick one cell, and while `ren` is high that cell is
// switched onto the macrocell's single output, `dout`, with `doe` high; when
// `ren` is low the bank amplifier outputs are open and `doe` is low, leaving
// the shared output node to another macrocell.
//
// Not modelled: the bottom-sampling switch sequence (writeTOP opening before
// writeBOTTOM), charge injection, leakage, and the reset / read phases of the
// bank amplifier. Writing is on `wclk`; reading is combinational.
module sas_cell_array
  import sas_pkg::*;
#(
  parameter int unsigned CELLS = 32
) (
  input  logic                 wclk,
  input  logic                 we,
  input  logic [CELLS-1:0]     waddr,
  input  sample_t              din [CHANNELS],
  input  logic [CELLS-1:0]     raddr,
  input  logic [1:0]           rch,
  input  logic                 ren,
  output sample_t              dout,
  output logic                 doe
);

  sample_t cap [CHANNELS][CELLS];

  always_ff @(posedge wclk) begin
    if (we) begin
      for (int c = 0; c < CELLS; c++) begin
        if (waddr[c]) begin
          for (int ch = 0; ch < CHANNELS; ch++) cap[ch][c] <= din[ch];
        end
      end
    end
  end

  always_comb begin
    dout = '0;
    if (ren) begin
      for (int c = 0; c < CELLS; c++) begin
        if (raddr[c] && rch < 2'(CHANNELS)) dout = dout | cap[rch][c];
      end
    end
    doe = ren && (raddr != '0);
  end

endmodule
