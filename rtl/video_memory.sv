// Video memory: shared address generation and the red, green and blue paths.
//
// One address generator (pixel divide-by-four, block and line counters, 4K
// block decode) serves three identical colour data paths, each with its own
// shift registers, pixel block register and NUM_BANKS x (4K x 4) memory.
// Pixels enter as an rgb triple on every pix_ce and leave the same way, one
// block later, when the memory is read with the same counters.
module video_memory
  import sph_pkg::*;
#(
  parameter int unsigned NUM_BANKS = NUM_BANKS_DEFAULT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  pix_ce,
  input  logic  vblank,
  input  logic  hsync,
  input  logic  count_en,
  input  logic  we_n,
  input  rgb_t  rgb_in,
  output rgb_t  rgb_out,
  output logic  mem_en,
  output logic [15:0] addr
);
  logic [11:0]          chip_addr;
  logic [NUM_BANKS-1:0] bank_sel;
  logic [2:0]           pin, pout;

  vmem_addr_gen #(.NUM_BANKS(NUM_BANKS)) u_addr (
    .clk, .rst_n, .pix_ce, .vblank, .hsync, .count_en,
    .mem_en, .addr, .chip_addr, .bank_sel
  );

  assign pin = {rgb_in.r, rgb_in.g, rgb_in.b};

  for (genvar c = 0; c < 3; c++) begin : g_color
    vmem_color_path #(.NUM_BANKS(NUM_BANKS)) u_path (
      .clk, .rst_n, .pix_ce, .mem_en, .we_n,
      .pix_in(pin[c]), .chip_addr, .bank_sel, .pix_out(pout[c])
    );
  end

  assign rgb_out = '{r: pout[2], g: pout[1], b: pout[0]};
endmodule
