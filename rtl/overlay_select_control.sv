// Overlay select control: chooses the stored RGB picture from line 121 down.
//
// An 8-bit line counter is held clear while the RS-170 vertical blank is
// active and counts rising edges of the RS-170 horizontal sync after it. A
// decoder on the count drives OVERLAY SELECT high once the count reaches
// OVERLAY_LINE (121); the decoder output also stops the counter, so the
// select stays high for the rest of the field. Lines 1..120 therefore show
// the RS-170 picture and lines 121 onward the video memory. This follows the
// design description and its block diagram (counter cleared by vertical
// blank, clocked by horizontal sync, count enable fed back from the decode).
// Here the counter runs on the master clock and counts detected sync edges.
//
// Timing: overlay_sel rises one clock after the clock on which the 121st
// hsync rising edge is seen, and falls while vblank is high.
module overlay_select_control #(
  parameter int unsigned OVERLAY_LINE = sph_pkg::OVERLAY_LINE_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic hsync,
  input  logic vblank,
  output logic overlay_sel
);
  logic [7:0] line_cnt;
  logic       hsync_q;
  logic       hsync_rise;

  assign hsync_rise  = hsync && !hsync_q;
  assign overlay_sel = (line_cnt == 8'(OVERLAY_LINE));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hsync_q  <= 1'b0;
      line_cnt <= '0;
    end else begin
      hsync_q <= hsync;
      if (vblank)                         line_cnt <= '0;
      else if (hsync_rise && !overlay_sel) line_cnt <= line_cnt + 1'b1;
    end
  end
endmodule
