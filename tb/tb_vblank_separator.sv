// Self-checking testbench for the vertical blank separator. Short pulses
// (horizontal sync, under VBLANK_MIN clocks) must never produce vblank; a pulse
// of L >= VBLANK_MIN clocks must give exactly L - VBLANK_MIN + 1 clocks of
// vblank, starting once the pulse has lasted VBLANK_MIN clocks and ending with
// the pulse.
module tb_vblank_separator;
  localparam int VMIN = 20;
  logic clk = 0, rst_n = 0;
  logic csync = 0, vblank;
  int   checks = 0, failures = 0;

  vblank_separator #(.VBLANK_MIN(VMIN)) dut (.clk, .rst_n, .csync, .vblank);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(input int len, input int gap);
    int hi, first;
    hi = 0; first = -1;
    csync = 1;
    for (int t = 0; t < len; t++) begin
      @(negedge clk);
      if (vblank) begin
        hi++;
        if (first < 0) first = t;
      end
    end
    csync = 0;
    for (int t = 0; t < gap; t++) begin
      @(negedge clk);
      if (vblank) hi++;
    end
    checks++;
    if (hi != ((len >= VMIN) ? len - VMIN + 1 : 0)) begin
      failures++;
      $display("FAIL pulse %0d: vblank high %0d clocks", len, hi);
    end
    if (len >= VMIN) begin
      checks++;
      if (first != VMIN - 1) begin
        failures++;
        $display("FAIL pulse %0d: vblank first at %0d", len, first);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      int len;
      len = (i % 10 == 9) ? VMIN + 1 + $urandom_range(0, 300) : $urandom_range(1, VMIN - 1);
      pulse(len, $urandom_range(1, 40));
    end
    pulse(VMIN - 1, 5);
    pulse(VMIN, 5);
    pulse(VMIN + 1, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
