// Self-checking testbench for the RS-170 sync and pixel clock generator at its
// default size. Over several lines it checks the line period (2275 clocks),
// the sync width (390 clocks), one line_start per line, the number of pixel
// enables per line (1 + floor(2274*154/358) = 979, i.e. 15.41 MHz at 35.8 MHz)
// and that consecutive pixel enables are 2 or 3 clocks apart.
module tb_rs170_sync_gen;
  localparam int H = 2275, HW = 390, NUM = 154, DEN = 358, LINES = 6;
  logic clk = 0, rst_n = 0;
  logic hsync, line_start, pix_ce;
  int   checks = 0, failures = 0;

  rs170_sync_gen dut (.clk, .rst_n, .hsync, .line_start, .pix_ce);

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (H * (LINES + 4)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, last_start, hs_len, ce_cnt, last_ce, exp_pix;
    exp_pix = 1 + ((H - 1) * NUM) / DEN;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // wait for the first line start
    do @(posedge clk); while (!line_start);
    for (int l = 0; l < LINES; l++) begin
      hs_len = 0; ce_cnt = 0; last_ce = -1;
      for (t = 0; t < H; t++) begin
        if (t > 0 && line_start) check("early line_start", t, H);
        if (t == 0) check("hsync at line start", hsync, 1);
        if (hsync) hs_len++;
        if (pix_ce) begin
          if (last_ce >= 0) begin
            checks++;
            if (t - last_ce < 2 || t - last_ce > 3) begin
              failures++;
              $display("FAIL pixel spacing %0d at t=%0d", t - last_ce, t);
            end
          end
          last_ce = t;
          ce_cnt++;
        end
        @(posedge clk);
      end
      check("line_start after a line", line_start, 1);
      check("hsync width", hs_len, HW);
      check("pixels per line", ce_cnt, exp_pix);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
