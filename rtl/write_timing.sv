// Write timing: eighth-field detector, line-121 detector and write-enable logic.
//
// A FIELD_BITS-bit counter counts rising edges of the RGB vertical blank; when
// all its bits are 1 (every eighth field) EIGHTH FIELD is high for that whole
// RGB field. An 8-bit line counter is held clear during RGB vertical blank and
// counts rising edges of the RGB horizontal sync; its decoder goes high when
// the count reaches WRITE_LINE (121) and the counter then stops, so the decode
// stays high for the rest of the field. TIME TO WRITE is the AND of the two.
// The combinational logic then makes the memory controls:
//   we_n     = !time_to_write                (chips read unless writing)
//   count_en = time_to_write | (overlay_sel & !eighth_field)
// so the address counters advance during the written lines of the eighth
// field, and during the overlaid lines of RS-170 fields otherwise. The
// counters, decodes and AND follow the design description; the exact
// COUNT EN equation, and counting sync edges on the master clock instead of
// clocking counters with the sync signals, are this design's choices.
//
// Interface: all inputs synchronous to clk. Outputs change one clock after
// the sync edge that causes them.
module write_timing #(
  parameter int unsigned FIELD_BITS = sph_pkg::FIELD_BITS_DEFAULT,
  parameter int unsigned WRITE_LINE = sph_pkg::OVERLAY_LINE_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic rgb_vblank,
  input  logic rgb_hsync,
  input  logic overlay_sel,
  output logic eighth_field,
  output logic time_to_write,
  output logic count_en,
  output logic we_n
);
  logic [FIELD_BITS-1:0] field_cnt;
  logic [7:0]            line_cnt;
  logic                  vblank_q, hsync_q;
  logic                  line_hit;

  assign eighth_field  = &field_cnt;
  assign line_hit      = (line_cnt == 8'(WRITE_LINE));
  assign time_to_write = eighth_field && line_hit;
  assign we_n          = !time_to_write;
  assign count_en      = time_to_write || (overlay_sel && !eighth_field);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vblank_q  <= 1'b0;
      hsync_q   <= 1'b0;
      field_cnt <= '0;
      line_cnt  <= '0;
    end else begin
      vblank_q <= rgb_vblank;
      hsync_q  <= rgb_hsync;
      if (rgb_vblank && !vblank_q) field_cnt <= field_cnt + 1'b1;
      if (rgb_vblank)                                line_cnt <= '0;
      else if (rgb_hsync && !hsync_q && !line_hit)   line_cnt <= line_cnt + 1'b1;
    end
  end
endmodule
