// End-to-end testbench of the video overlay frame buffer at its full default
// size. A PRO-350 model (own 15.4 MHz pixel clock, 262-line fields, striped
// test pattern that changes every field) drives the RGB inputs; an MC1378
// model returns the RS-170 vertical sync for the horizontal sync the design
// produces. About 18 RGB fields are run, so the memory is written twice.
// Checked, independently of the design's internals:
//  - overlay_select is low on RS-170 lines 1..120 and high on 121..240;
//  - write_field is high exactly in RGB fields 7, 15, ... (every eighth) and
//    writing from RGB line 121 of those fields;
//  - on overlaid lines of an RS-170 field with no memory update since its
//    vertical blank, rgb_data shows the RGB picture of the last written field
//    at the same line, one 4-pixel block to the right (each 32-pixel stripe
//    is compared except its outer 3 pixels, which allows for the two
//    sources' clock phase; pixels under the RGB sync are not compared);
//  - on overlaid lines during or after an update in the same field,
//    rgb_data is black.
// Each mechanism (write field, write start, black field, stored picture shown,
// picture replaced by a later write, both RS-170 field lengths) is counted
// and must happen.
module tb_sph_top;
  import sph_pkg::*;
  localparam real T_CLK  = 1000.0 / 35.8;        // ns
  localparam int  H_DIV  = 2275;
  localparam int  LAST_FIELD = 18;
  localparam int  OFFSET_PIX = 4;                // one block of read delay

  logic clk = 0, rst_n = 0;
  real  red_v, green_v, blue_v;
  int   p_field, p_line, p_pix, rs_field_lines;
  logic rs_vsync, rs_hsync, overlay_select, write_field, writing;
  rgb_t rgb_data;

  int checks = 0, failures = 0;
  int n_write_fields = 0, n_write_starts = 0, n_black_lines = 0, n_rgb_lines = 0;
  int n_rs_lines = 0, n_262 = 0, n_263 = 0, n_pictures = 0, n_pix_checks = 0;

  always #(T_CLK / 2.0) clk = ~clk;

  pro350_model u_pro (.red_v, .green_v, .blue_v, .field_idx(p_field), .line_idx(p_line), .pix_idx(p_pix));
  mc1378_model u_mc  (.hsync(rs_hsync), .vsync(rs_vsync), .field_lines(rs_field_lines));

  sph_top dut (
    .clk, .rst_n, .red_v, .green_v, .blue_v,
    .rs170_vsync(rs_vsync), .rs170_hsync(rs_hsync), .rgb_data,
    .overlay_select, .write_field, .writing
  );

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30)
        $display("FAIL %s at %0t ns: got %0d expected %0d (RGB field %0d line %0d)",
                 what, $time, got, exp, p_field, p_line);
    end
  endtask

  function automatic int pattern(int field, int line, int pix);
    return (field + line + pix / 32) % 8;
  endfunction

  initial begin
    #(T_CLK * H_DIV * 263.0 * (LAST_FIELD + 3));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- RGB side
  int   write_of = -1;       // RGB field captured by the current write
  int   stored   = -1;       // RGB field held in memory (complete writes)
  logic wf_q = 0, wr_q = 0;
  int   cyc = 0;
  bit   checked_a [64], checked_b [64], checked_c [64];

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (write_field && !wf_q) begin
        n_write_fields++;
        write_of = p_field;
      end
      if (!write_field && wf_q) begin
        stored = write_of;
        n_pictures++;
      end
      if (writing && !wr_q) n_write_starts++;
      wf_q = write_field;
      wr_q = writing;
      // write_field in the middle of the picture, once per RGB field
      if (p_field > 0 && p_field < 64 && p_line == 60 && p_pix == 500 && !checked_a[p_field]) begin
        checked_a[p_field] = 1;
        check("write_field", write_field, (p_field % 8 == 7));
      end
      // writing: RGB line n is model line 19 + n
      if (p_field > 0 && p_field < 64 && p_line == 19 + 120 && p_pix == 500 && !checked_b[p_field]) begin
        checked_b[p_field] = 1;
        check("writing before line 121", writing, 0);
      end
      if (p_field > 0 && p_field < 64 && p_line == 19 + 121 && p_pix == 500 && !checked_c[p_field]) begin
        checked_c[p_field] = 1;
        check("writing from line 121", writing, (p_field % 8 == 7));
      end
    end
  end

  // ------------------------------------------------------------ RS-170 side
  int   rs_line = 0, n = 0;
  logic hs_q = 0, wf_q2 = 0;
  int   wf_change = 0;       // cycle of the last write_field change, seen after the edge
  logic clean = 0;           // no memory update since this field's vertical blank
  bit   line_black, line_rgb;

  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      if (rs_vsync) begin
        if (rs_line > 0) begin
          if (rs_field_lines == 263) n_263++; else n_262++;
        end
        rs_line = 0;
        clean = !write_field;
      end
      if (write_field) clean = 0;
      if (write_field != wf_q2) wf_change = cyc;
      wf_q2 = write_field;
      if (rs_hsync && !hs_q) begin
        if (line_black) n_black_lines++;
        if (line_rgb) n_rgb_lines++;
        line_black = 0; line_rgb = 0;
        n = 0;
        if (!rs_vsync) rs_line++;
      end else begin
        n++;
      end
      hs_q = rs_hsync;

      if (rs_line >= 1 && rs_line <= 240 && n == H_DIV / 2) begin
        check("overlay_select", overlay_select, rs_line >= 121);
        if (rs_line < 121) n_rs_lines++;
      end

      if (rs_line >= 121 && rs_line <= 240 && n % 8 == 0 && cyc - wf_change > 4) begin
        real t_ns;
        int  x;
        t_ns = n * T_CLK;
        x = int'($floor(t_ns / 64.94)) - OFFSET_PIX;
        if (x >= 176 && x < 800 && (x % 32) >= 3 && (x % 32) <= 28) begin
          if (!clean) begin
            check("black during update", rgb_data, 0);
            line_black = 1;
          end else if (stored >= 0) begin
            check("stored RGB picture", rgb_data, pattern(stored, 19 + rs_line, x));
            line_rgb = 1;
            n_pix_checks++;
          end
        end
      end
    end
  end

  initial begin
    #(T_CLK * 5);
    rst_n = 1;
    wait (p_field == LAST_FIELD);
    $display("write fields %0d, write starts %0d, pictures stored %0d", n_write_fields, n_write_starts, n_pictures);
    $display("RS-170 lines %0d, overlaid RGB lines %0d, black lines %0d, fields 262:%0d 263:%0d, pixel checks %0d",
             n_rs_lines, n_rgb_lines, n_black_lines, n_262, n_263, n_pix_checks);
    check("write fields happened", n_write_fields >= 2, 1);
    check("write starts happened", n_write_starts >= 2, 1);
    check("picture replaced", n_pictures >= 2, 1);
    check("stored picture shown", n_rgb_lines > 200, 1);
    check("black output during update", n_black_lines > 0, 1);
    check("RS-170 lines shown", n_rs_lines > 1000, 1);
    check("both field lengths", n_262 > 0 && n_263 > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
