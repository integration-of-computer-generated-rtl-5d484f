// One 4K x 4 static RAM chip of the video memory.
//
// Stands for the fast 4K x 4 SRAM part the design uses (12 address lines, four
// data lines shared between read and write). The shared data pins are split
// into wdata and rdata. A write happens on a clock edge while cs is high and
// we_n is low; a read is asynchronous, as in the real part: while cs is high
// and we_n high, rdata shows the addressed word. When the chip is not
// selected rdata is 0, so the outputs of several chips can be ORed onto one
// bus the way their tri-state outputs share it in hardware. Contents are not
// reset.
module sram_4kx4 (
  input  logic        clk,
  input  logic        cs,
  input  logic        we_n,
  input  logic [11:0] addr,
  input  logic [3:0]  wdata,
  output logic [3:0]  rdata
);
  logic [3:0] mem [4096];

  always_ff @(posedge clk) begin
    if (cs && !we_n) mem[addr] <= wdata;
  end

  assign rdata = (cs && we_n) ? mem[addr] : 4'b0000;
endmodule
