// Self-checking testbench for the overlay select control at its default line
// (121). Generates fields of horizontal sync pulses after a vertical blank and
// checks, in the middle of every line, that overlay_sel is high exactly on
// lines 121 and after (line n starts with the n-th sync after vblank).
module tb_overlay_select_control;
  localparam int LINE = 16, HS = 3, VB_LINES = 4, FIELD_LINES = 262, FIELDS = 3;
  logic clk = 0, rst_n = 0;
  logic hsync = 0, vblank = 0, ovl;
  int   checks = 0, failures = 0, sel_lines = 0;

  overlay_select_control dut (.clk, .rst_n, .hsync, .vblank, .overlay_sel(ovl));

  always #5 clk = ~clk;

  initial begin
    repeat (LINE * (FIELD_LINES + VB_LINES + 2) * (FIELDS + 1)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int f = 0; f < FIELDS; f++) begin
      vblank = 1;
      repeat (LINE * VB_LINES) @(negedge clk);
      vblank = 0;
      repeat (5) @(negedge clk);
      for (int n = 1; n <= FIELD_LINES; n++) begin
        hsync = 1;
        repeat (HS) @(negedge clk);
        hsync = 0;
        repeat (LINE / 2 - HS) @(negedge clk);
        checks++;
        if (ovl !== (n >= 121)) begin
          failures++;
          $display("FAIL field %0d line %0d: overlay_sel=%0b", f, n, ovl);
        end
        if (ovl) sel_lines++;
        repeat (LINE - LINE / 2) @(negedge clk);
      end
    end
    checks++;
    if (sel_lines != FIELDS * (FIELD_LINES - 120)) begin
      failures++;
      $display("FAIL selected lines %0d", sel_lines);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
