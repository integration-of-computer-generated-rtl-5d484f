// Video memory address generation, shared by the three colour memories.
//
// A 2-bit pixel counter counts pixel clocks; its two bits ANDed mark the
// fourth pixel of every block, MEM EN, on which the pixel block register is
// loaded (write) or the output shift register is loaded (read). A pixel block
// counter (address bits A7..A0) advances on MEM EN and a line counter (A15..A8)
// on each horizontal sync, both only while COUNT EN is high. Bits A11..A0 go
// to every 4K x 4 chip; A15..A12 are decoded into one-hot 4K block selects.
// All counters are held clear during vertical blank. Because a line (about 245
// blocks) is shorter than the 256-block stride, the pixel and block counters
// are also cleared at each horizontal sync edge, so every line starts at
// block 0; the description only names the vertical-blank clear, so this clear
// is this design's choice. The address format and the divide-by-four follow
// the description.
//
// Timing: hsync and vblank are levels synchronous to clk; the hsync rising
// edge is detected internally. mem_en is a one-clock pulse on a pix_ce clock.
// addr changes on the clock after mem_en (block) or after the hsync edge (line).
module vmem_addr_gen #(
  parameter int unsigned NUM_BANKS = sph_pkg::NUM_BANKS_DEFAULT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 pix_ce,
  input  logic                 vblank,
  input  logic                 hsync,
  input  logic                 count_en,
  output logic                 mem_en,
  output logic [15:0]          addr,
  output logic [11:0]          chip_addr,
  output logic [NUM_BANKS-1:0] bank_sel
);
  logic [1:0] phase;
  logic [7:0] block_cnt;
  logic [7:0] line_cnt;
  logic       hsync_q;
  logic       hsync_rise;

  initial assert (NUM_BANKS >= 1 && NUM_BANKS <= 16) else $error("NUM_BANKS must be 1..16");

  assign hsync_rise = hsync && !hsync_q;
  assign mem_en     = pix_ce && (&phase) && !vblank && !hsync_rise;
  assign addr       = {line_cnt, block_cnt};
  assign chip_addr  = addr[11:0];

  always_comb begin
    for (int i = 0; i < NUM_BANKS; i++) bank_sel[i] = (addr[15:12] == 4'(i));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hsync_q   <= 1'b0;
      phase     <= '0;
      block_cnt <= '0;
      line_cnt  <= '0;
    end else begin
      hsync_q <= hsync;
      if (vblank || hsync_rise) phase <= '0;
      else if (pix_ce)          phase <= phase + 1'b1;

      if (vblank || hsync_rise)     block_cnt <= '0;
      else if (mem_en && count_en)  block_cnt <= block_cnt + 1'b1;

      if (vblank)                     line_cnt <= '0;
      else if (hsync_rise && count_en) line_cnt <= line_cnt + 1'b1;
    end
  end

  mem_en_on_pixel: assert property (@(posedge clk) disable iff (!rst_n) mem_en |-> pix_ce);
endmodule
