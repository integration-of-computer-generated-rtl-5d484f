// Self-checking testbench for the video memory control. RGB composite sync
// (short line pulses, one long vertical pulse per field) and RS-170 syncs run
// at different rates. Checks: the separated RGB vertical blank appears only in
// the long pulses, VBLANK_MIN clocks after they start; the sync multiplexer
// passes the RGB syncs during the write (eighth) field and the RS-170 syncs
// otherwise; time_to_write from line WRITE_LINE of the eighth field; and
// read_valid low during the write field and high again only after an RS-170
// vertical blank outside it.
module tb_video_memory_control;
  localparam int VMIN = 8, WLINE = 5;
  localparam int RGB_LINE = 26, RGB_HS = 4, RGB_VB = 30, RGB_LINES = 12;
  localparam int RS_LINE = 22, RS_HS = 3, RS_VB_LINES = 2, RS_LINES = 17;
  logic clk = 0, rst_n = 0;
  logic csync = 0, rs_hs, rs_vb, ovl = 0;
  logic rgb_vb, mvb, mhs, eighth, ttw, cen, we_n, rvalid;
  int   checks = 0, failures = 0;
  int   n_write_fields = 0, n_valid_rise = 0, n_ttw = 0;
  int   rgb_field = 0, rgb_line = 0, long_run = 0;
  int   rs_cnt = 0;
  logic seen_rs_vb_outside = 0;

  video_memory_control #(.VBLANK_MIN(VMIN), .WRITE_LINE(WLINE)) dut (
    .clk, .rst_n, .rgb_csync(csync), .rs_hsync(rs_hs), .rs_vblank(rs_vb), .overlay_sel(ovl),
    .rgb_vblank(rgb_vb), .mem_vblank(mvb), .mem_hsync(mhs), .eighth_field(eighth),
    .time_to_write(ttw), .count_en(cen), .we_n, .read_valid(rvalid));

  always #5 clk = ~clk;

  // RS-170 syncs: free-running counter, vertical blank over the first lines.
  assign rs_hs = (rs_cnt % RS_LINE) < RS_HS;
  assign rs_vb = (rs_cnt / RS_LINE) < RS_VB_LINES;
  always @(posedge clk) rs_cnt <= (rs_cnt == RS_LINE * RS_LINES - 1) ? 0 : rs_cnt + 1;

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0b expected %0b (rgb field %0d line %0d)",
               what, $time, got, exp, rgb_field, rgb_line);
    end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // RGB composite sync generator.
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (rgb_field = 1; rgb_field <= 20; rgb_field++) begin
      rgb_line = 0;
      csync = 1;
      repeat (RGB_VB) @(negedge clk);
      csync = 0;
      repeat (RGB_LINE - RGB_HS) @(negedge clk);
      for (rgb_line = 1; rgb_line <= RGB_LINES; rgb_line++) begin
        csync = 1;
        repeat (RGB_HS) @(negedge clk);
        csync = 0;
        repeat (RGB_LINE - RGB_HS) @(negedge clk);
      end
    end
    checks++;
    if (n_write_fields < 2 || n_valid_rise < 2 || n_ttw < 2) begin
      failures++;
      $display("FAIL coverage: write fields %0d, read_valid rises %0d, write starts %0d",
               n_write_fields, n_valid_rise, n_ttw);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Per-clock reference checks, made just after each rising edge. The
  // generator changes csync on falling edges.
  int   cur_field = 0;
  logic eighth_q = 0, ttw_q = 0, rvalid_q = 0;

  always @(posedge clk) if (rst_n) begin
    logic exp_8;
    #2;
    long_run = csync ? long_run + 1 : 0;
    if (rgb_line == 0 && long_run >= VMIN + 1) cur_field = rgb_field;
    exp_8 = (cur_field % 8 == 7);
    check("rgb_vblank", rgb_vb, long_run >= VMIN);
    check("eighth_field", eighth, exp_8);
    check("mux vblank", mvb, exp_8 ? rgb_vb : rs_vb);
    check("mux hsync", mhs, exp_8 ? csync : rs_hs);
    // until the new field's vertical blank is separated, the old line count holds
    check("time_to_write", ttw, exp_8 && (rgb_line >= WLINE ||
          (rgb_line == 0 && cur_field != rgb_field && cur_field != 0)));
    check("we_n", we_n, !ttw);
    check("count_en", cen, ttw || (ovl && !exp_8));
    if (exp_8 && eighth_q) check("read_valid in write field", rvalid, 1'b0);
    if (rvalid && n_write_fields > 0)
      check("read_valid only after RS-170 vblank", seen_rs_vb_outside, 1'b1);
    if (eighth && !eighth_q) begin
      n_write_fields++;
      seen_rs_vb_outside = 0;
    end
    if (ttw && !ttw_q) n_ttw++;
    if (rvalid && !rvalid_q) n_valid_rise++;
    if (!eighth && rs_vb) seen_rs_vb_outside = 1;
    eighth_q = eighth; ttw_q = ttw; rvalid_q = rvalid;
  end

  always @(negedge clk) ovl = 1'($urandom);
endmodule
