// RS-170 horizontal sync and pixel clock generator.
//
// The MC1378 overlay IC supplies a master clock phase-locked to the incoming
// RS-170 sync. A line counter divides it by H_DIV (2275) to make the
// horizontal sync that is returned to the MC1378 and that times memory reads;
// a decoder on the same counter produces the 15.4 MHz pixel timing. Because
// 35.8 MHz is not an integer multiple of 15.4 MHz, the pixel clock is made
// here as a clock enable from a fractional accumulator (PIX_NUM/PIX_DEN of the
// master rate) that is re-phased at every line start, so every line has the
// same pixel pattern. The divide by 2275 and the two frequencies follow the
// design description; the accumulator and the sync width are this design's
// choices (width = 10.9 us, the horizontal sync length the description uses).
//
// Timing: hsync is high for the first HSYNC_WIDTH clocks of each H_DIV-clock
// line; line_start is a one-clock pulse on the first clock of the line;
// pix_ce is high on one clock per pixel period, starting on the line's first
// clock.
module rs170_sync_gen #(
  parameter int unsigned H_DIV       = sph_pkg::H_DIV_DEFAULT,
  parameter int unsigned HSYNC_WIDTH = sph_pkg::HSYNC_WIDTH_DEFAULT,
  parameter int unsigned PIX_NUM     = sph_pkg::PIX_NUM_DEFAULT,
  parameter int unsigned PIX_DEN     = sph_pkg::PIX_DEN_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  output logic hsync,
  output logic line_start,
  output logic pix_ce
);
  localparam int unsigned CW = $clog2(H_DIV);
  localparam int unsigned AW = $clog2(PIX_DEN + PIX_NUM + 1);

  logic [CW-1:0] hcnt;
  logic [AW-1:0] acc;
  logic [AW-1:0] acc_sum;

  initial begin
    assert (PIX_NUM < PIX_DEN) else $error("pixel rate must be below the master clock");
    assert (HSYNC_WIDTH < H_DIV) else $error("sync must be shorter than a line");
  end

  assign line_start = (hcnt == '0);
  assign hsync      = (hcnt < CW'(HSYNC_WIDTH));

  // Phase accumulator: the line's first clock always carries a pixel.
  always_comb begin
    if (line_start) acc_sum = AW'(PIX_DEN);
    else            acc_sum = acc + AW'(PIX_NUM);
  end
  assign pix_ce = (acc_sum >= AW'(PIX_DEN));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hcnt <= '0;
      acc  <= '0;
    end else begin
      hcnt <= (hcnt == CW'(H_DIV - 1)) ? '0 : hcnt + 1'b1;
      acc  <= pix_ce ? acc_sum - AW'(PIX_DEN) : acc_sum;
    end
  end
endmodule
