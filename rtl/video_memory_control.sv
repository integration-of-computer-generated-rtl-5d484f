// Video memory control: RGB vertical-blank separation, write enables and the
// sync multiplexer that steers the memory address counters.
//
// The RGB composite sync (stripped from the green line) goes through the
// vertical blank separator. The write timing block turns the RGB vertical
// blank and composite sync into EIGHTH FIELD, TIME TO WRITE, COUNT EN and /W.
// A 2:1 multiplexer controlled by EIGHTH FIELD hands the address counters the
// RGB vertical blank and horizontal sync during the eighth RGB field (write)
// and the RS-170 ones otherwise (read). This is the structure of the design
// description.
//
// read_valid is this design's addition: it marks an RS-170 field whose address
// counters were cleared by the RS-170 vertical blank while no write field was
// active. It drops as soon as a write field starts and returns at the next
// RS-170 vertical blank outside a write field; while it is low the output
// shows black, as the description requires during memory updates.
module video_memory_control #(
  parameter int unsigned VBLANK_MIN = sph_pkg::VBLANK_MIN_DEFAULT,
  parameter int unsigned FIELD_BITS = sph_pkg::FIELD_BITS_DEFAULT,
  parameter int unsigned WRITE_LINE = sph_pkg::OVERLAY_LINE_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic rgb_csync,
  input  logic rs_hsync,
  input  logic rs_vblank,
  input  logic overlay_sel,
  output logic rgb_vblank,
  output logic mem_vblank,
  output logic mem_hsync,
  output logic eighth_field,
  output logic time_to_write,
  output logic count_en,
  output logic we_n,
  output logic read_valid
);
  vblank_separator #(.VBLANK_MIN(VBLANK_MIN)) u_vsep (
    .clk, .rst_n, .csync(rgb_csync), .vblank(rgb_vblank)
  );

  write_timing #(.FIELD_BITS(FIELD_BITS), .WRITE_LINE(WRITE_LINE)) u_wt (
    .clk, .rst_n,
    .rgb_vblank, .rgb_hsync(rgb_csync), .overlay_sel,
    .eighth_field, .time_to_write, .count_en, .we_n
  );

  // 2:1 sync multiplexer (select = eighth-field detect).
  always_comb begin
    if (eighth_field) begin
      mem_vblank = rgb_vblank;
      mem_hsync  = rgb_csync;
    end else begin
      mem_vblank = rs_vblank;
      mem_hsync  = rs_hsync;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            read_valid <= 1'b0;
    else if (eighth_field) read_valid <= 1'b0;
    else if (rs_vblank)    read_valid <= 1'b1;
  end

  // Memory output is never shown once an update field has begun, and the
  // memory is only written inside an update field.
  no_read_in_write_field: assert property (@(posedge clk) disable iff (!rst_n)
    eighth_field |=> !read_valid);
  write_only_in_write_field: assert property (@(posedge clk) disable iff (!rst_n)
    !we_n |-> eighth_field);
endmodule
