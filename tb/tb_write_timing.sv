// Self-checking testbench for the write timing logic at its default sizes
// (write every eighth field, from line 121). Drives 20 RGB fields of vertical
// blank plus 140 sync-separated lines, with overlay_sel random per line, and
// checks in every line: eighth_field high only in fields that follow the 7th,
// 15th, ... vertical blank; time_to_write = eighth_field and line >= 121;
// we_n = !time_to_write; count_en = time_to_write | (overlay_sel & !eighth).
module tb_write_timing;
  localparam int LINE = 12, HS = 3, VB = 40, FIELD_LINES = 140, FIELDS = 20;
  logic clk = 0, rst_n = 0;
  logic vb = 0, hs = 0, ovl = 0;
  logic eighth, ttw, cen, we_n;
  int   checks = 0, failures = 0, write_lines = 0, write_fields = 0;

  write_timing dut (.clk, .rst_n, .rgb_vblank(vb), .rgb_hsync(hs), .overlay_sel(ovl),
                    .eighth_field(eighth), .time_to_write(ttw), .count_en(cen), .we_n);

  always #5 clk = ~clk;

  task automatic check(input string what, input logic got, input logic exp, input int f, input int n);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s field %0d line %0d: got %0b expected %0b", what, f, n, got, exp);
    end
  endtask

  initial begin
    repeat ((VB + LINE * (FIELD_LINES + 2)) * (FIELDS + 1)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_8, exp_w;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int p = 1; p <= FIELDS; p++) begin
      vb = 1; hs = 1;
      repeat (VB) @(negedge clk);
      vb = 0; hs = 0;
      repeat (4) @(negedge clk);
      exp_8 = (p % 8 == 7);
      if (exp_8) write_fields++;
      for (int n = 1; n <= FIELD_LINES; n++) begin
        hs = 1;
        ovl = 1'($urandom);
        repeat (HS) @(negedge clk);
        hs = 0;
        repeat (LINE / 2 - HS) @(negedge clk);
        exp_w = exp_8 && (n >= 121);
        if (ttw) write_lines++;
        check("eighth_field", eighth, exp_8, p, n);
        check("time_to_write", ttw, exp_w, p, n);
        check("we_n", we_n, !exp_w, p, n);
        check("count_en", cen, exp_w || (ovl && !exp_8), p, n);
        ovl = !ovl;
        #1 check("count_en after overlay change", cen, exp_w || (ovl && !exp_8), p, n);
        repeat (LINE - LINE / 2) @(negedge clk);
      end
    end
    checks++;
    if (write_fields != 2 || write_lines != 2 * (FIELD_LINES - 120)) begin
      failures++;
      $display("FAIL write fields %0d write lines %0d", write_fields, write_lines);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
