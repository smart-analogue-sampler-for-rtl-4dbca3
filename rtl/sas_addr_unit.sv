// sas_addr_unit: write or read addressing unit of one analogue memory macrocell.
//
// A linear shift register with a serial input and CELLS one-hot parallel
// outputs, as in the chip. Each pulse of the dispatched clock (here a clock
// enable, `step`) moves the token one cell on; a pulse while `sin` is high
// loads the token into the first cell, so the first pulse of a window already
// addresses cell 1. The token shifted out of the last cell appears on `sout`
// as the serial output: it is the "next write" / "next read" output, and
// feeding it to the serial input of another unit stepped by the same clock
// chains the two into one longer shift register.
//
// Timing: `addr_next` is the cell that the pulse now arriving selects (the
// cell written or read at this edge); `addr` holds it after the edge. `sout`
// is the last stage, high while the token waits in the last cell and leaves
// on the next pulse. The document's pulse shaping (separate writeTOP / writeBOTTOM edges)
// is analogue timing below one clock period and is not modelled.
module sas_addr_unit #(
  parameter int unsigned CELLS = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             step,
  input  logic             sin,
  output logic [CELLS-1:0] addr,
  output logic [CELLS-1:0] addr_next,
  output logic             sout
);

  always_comb begin
    addr_next = {addr[CELLS-2:0], sin};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr <= '0;
    end else if (step) begin
      addr <= addr_next;
    end
  end

  assign sout = addr[CELLS-1];

endmodule
