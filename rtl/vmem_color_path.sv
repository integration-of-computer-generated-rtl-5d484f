// Data path of one colour in the video memory.
//
// Write side: a 4-bit shift register clocked by the pixel clock collects the
// colour bit of four pixels (first pixel ends up in the MSB). On MEM EN the
// completed block is copied into the pixel block register; if /W is low the
// block is written, on the following clock, into the 4K x 4 chip picked by
// the block select, at the address latched with it. Read side: on MEM EN the
// memory data bus is loaded into an output shift register, which then shifts
// one pixel out per pixel clock, MSB first. The data bus is driven by the
// pixel block register during writes and by the selected chip during reads,
// as in the description; here that shared bus is a multiplexer and an OR of
// the chip outputs. NUM_BANKS chips make up the colour memory.
//
// Timing: the four pixels loaded on a MEM EN appear on pix_out during the
// four pixel periods that follow it, so a stored line is shown four pixels
// (one block) later than it was captured relative to horizontal sync.
module vmem_color_path #(
  parameter int unsigned NUM_BANKS = sph_pkg::NUM_BANKS_DEFAULT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 pix_ce,
  input  logic                 mem_en,
  input  logic                 we_n,
  input  logic                 pix_in,
  input  logic [11:0]          chip_addr,
  input  logic [NUM_BANKS-1:0] bank_sel,
  output logic                 pix_out
);
  logic [2:0]           in_sr;
  logic [3:0]           block_in;
  logic [3:0]           hold;
  logic                 wr_pend;
  logic [11:0]          wr_addr;
  logic [NUM_BANKS-1:0] wr_bank;
  logic [3:0]           out_sr;
  logic [3:0]           rd_bus;
  logic [3:0]           data_bus;
  logic [3:0]           chip_rdata [NUM_BANKS];

  assign block_in = {in_sr, pix_in};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_sr   <= '0;
      hold    <= '0;
      wr_pend <= 1'b0;
      wr_addr <= '0;
      wr_bank <= '0;
      out_sr  <= '0;
    end else begin
      if (pix_ce) in_sr <= block_in[2:0];
      wr_pend <= mem_en && !we_n;
      if (mem_en) begin
        hold    <= block_in;
        wr_addr <= chip_addr;
        wr_bank <= bank_sel;
        out_sr  <= data_bus;
      end else if (pix_ce) begin
        out_sr <= {out_sr[2:0], 1'b0};
      end
    end
  end

  for (genvar i = 0; i < NUM_BANKS; i++) begin : g_chip
    sram_4kx4 u_chip (
      .clk,
      .cs   (wr_pend ? wr_bank[i] : bank_sel[i]),
      .we_n (!wr_pend),
      .addr (wr_pend ? wr_addr : chip_addr),
      .wdata(hold),
      .rdata(chip_rdata[i])
    );
  end

  always_comb begin
    rd_bus = '0;
    for (int i = 0; i < NUM_BANKS; i++) rd_bus |= chip_rdata[i];
  end

  assign data_bus = we_n ? rd_bus : hold;
  assign pix_out  = out_sr[3];

  // A block write must finish before the next block arrives, and a block
  // boundary is always a pixel boundary.
  write_done_before_next_block: assert property (@(posedge clk) disable iff (!rst_n)
    mem_en |-> !wr_pend);
  block_on_pixel: assert property (@(posedge clk) disable iff (!rst_n) mem_en |-> pix_ce);
endmodule
