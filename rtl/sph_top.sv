// Video overlay frame buffer: puts PRO-350 computer RGB video on the lower
// half of an RS-170 picture although the two sources are not synchronised.
//
// The RGB input (analog volts) is sliced to one bit per colour and its
// composite sync is stripped by the input interface. The RS-170 side is
// timed by the MC1378 overlay IC outside this module: it supplies the master
// clock `clk` (35.8 MHz, locked to the RS-170 sync) and returns the RS-170
// vertical sync `rs170_vsync` generated from the horizontal sync this module
// sends it on `rs170_hsync`. Every eighth RGB field, from RGB line 121 on, the
// picture is captured into the video memory, four pixels per word, with the
// address counters following the RGB syncs. In every other RS-170 field the
// same counters, now following the RS-170 syncs, read the memory from RS-170
// line 121 on, so the stored RGB lines come out aligned with the RS-170
// picture. `overlay_select` tells the MC1378 video switch to show `rgb_data`
// (high) or the RS-170 video (low). During an RS-170 field that overlaps a
// memory update, `rgb_data` is black.
//
// Everything runs on `clk`; the 15.4 MHz pixel timing is a clock enable. The
// asynchronous RGB comparator outputs and the returned vertical sync pass
// through two-flop synchronisers. The block structure and numbers follow the
// design description; the single-clock form, the synchronisers, the black
// gating flag and 8 (not 6) memory chips per colour are this design's
// choices, explained in the README.
module sph_top
  import sph_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  // PRO-350 RGB video, volts (colour 0.3..0.7 V, sync on green down to -0.3 V)
  input  real  red_v,
  input  real  green_v,
  input  real  blue_v,
  // From the MC1378: RS-170 vertical sync / blank, active high, asynchronous
  input  logic rs170_vsync,
  // To the MC1378
  output logic rs170_hsync,
  output rgb_t rgb_data,
  output logic overlay_select,
  // Status
  output logic write_field,
  output logic writing
);
  logic red_a, green_a, blue_a, csync_a;
  logic csync_s, rs_vblank;
  rgb_t rgb_s, mem_rgb;
  logic pix_ce;
  logic mem_vblank, mem_hsync, count_en, we_n, read_valid;

  input_interface u_in (
    .red_v, .green_v, .blue_v,
    .red(red_a), .green(green_a), .blue(blue_a), .csync(csync_a)
  );

  sync_ff u_sr (.clk, .rst_n, .d(red_a),       .q(rgb_s.r));
  sync_ff u_sg (.clk, .rst_n, .d(green_a),     .q(rgb_s.g));
  sync_ff u_sb (.clk, .rst_n, .d(blue_a),      .q(rgb_s.b));
  sync_ff u_sc (.clk, .rst_n, .d(csync_a),     .q(csync_s));
  sync_ff u_sv (.clk, .rst_n, .d(rs170_vsync), .q(rs_vblank));

  rs170_sync_gen u_sync (
    .clk, .rst_n, .hsync(rs170_hsync), .line_start(), .pix_ce
  );

  overlay_select_control u_ovl (
    .clk, .rst_n, .hsync(rs170_hsync), .vblank(rs_vblank),
    .overlay_sel(overlay_select)
  );

  video_memory_control u_ctl (
    .clk, .rst_n,
    .rgb_csync(csync_s), .rs_hsync(rs170_hsync), .rs_vblank,
    .overlay_sel(overlay_select),
    .rgb_vblank(), .mem_vblank, .mem_hsync,
    .eighth_field(write_field), .time_to_write(writing),
    .count_en, .we_n, .read_valid
  );

  video_memory u_mem (
    .clk, .rst_n, .pix_ce, .vblank(mem_vblank), .hsync(mem_hsync),
    .count_en, .we_n, .rgb_in(rgb_s), .rgb_out(mem_rgb),
    .mem_en(), .addr()
  );

  assign rgb_data = read_valid ? mem_rgb : RGB_BLACK;
endmodule
