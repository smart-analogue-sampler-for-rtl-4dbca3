// tb_sas_cell_array: self-checking test of the cell-array model. Writes
// random codes into random cells of all three channels, then reads every
// cell of every channel back and checks the output enable.
module tb_sas_cell_array;
  import sas_pkg::*;
  localparam int unsigned CELLS = 32;
  logic clk = 1'b0, we = 1'b0, ren = 1'b0;
  logic [CELLS-1:0] waddr = '0, raddr = '0;
  logic [1:0] rch = '0;
  sample_t din [CHANNELS];
  sample_t dout;
  logic doe;
  sample_t ref_mem [CHANNELS][CELLS];
  int checks = 0, failures = 0;

  sas_cell_array #(.CELLS(CELLS)) dut (.wclk(clk), .*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ch = 0; ch < CHANNELS; ch++) din[ch] = '0;
    // fill every cell once, then overwrite random cells
    for (int n = 0; n < CELLS + 200; n++) begin
      automatic int c = (n < CELLS) ? n : int'($urandom_range(0, CELLS-1));
      @(negedge clk);
      we = 1'b1;
      waddr = CELLS'(1) << c;
      for (int ch = 0; ch < CHANNELS; ch++) begin
        din[ch] = sample_t'($urandom);
        ref_mem[ch][c] = din[ch];
      end
    end
    @(negedge clk); we = 1'b0;
    // a write strobe with no address stores nothing
    @(negedge clk); we = 1'b1; waddr = '0; din[0] = ~ref_mem[0][0];
    @(negedge clk); we = 1'b0;
    // a held address without strobe stores nothing
    waddr = 1; din[1] = ~ref_mem[1][0];
    @(negedge clk);
    ren = 1'b1;
    for (int ch = 0; ch < CHANNELS; ch++) begin
      for (int c = 0; c < CELLS; c++) begin
        rch = 2'(ch); raddr = CELLS'(1) << c;
        #1;
        checks++;
        if (dout !== ref_mem[ch][c] || !doe) begin
          failures++;
          $display("FAIL ch%0d cell%0d got %h want %h", ch, c, dout, ref_mem[ch][c]);
        end
      end
    end
    ren = 1'b0; #1;
    checks++; if (doe) begin failures++; $display("FAIL doe with ren low"); end
    ren = 1'b1; raddr = '0; #1;
    checks++; if (doe) begin failures++; $display("FAIL doe with no address"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
