// Self-checking testbench for the video memory (address generation plus three
// colour paths) at its default size. One write field stores random colours
// for 24 lines, then two read fields with the same sync timing must return
// them: the pixel sampled on the k-th pixel enable after a line's sync edge is
// shown on the (k+4)-th, one block later, for every complete block of the
// line. A final check confirms nothing is written while /W is high.
module tb_video_memory;
  import sph_pkg::*;
  localparam int LINE = 120, HS = 6, VB = 200, LINES = 24, MAXPIX = 64;
  logic clk = 0, rst_n = 0;
  logic pix_ce = 0, vblank = 0, hsync = 0, count_en = 0, we_n = 1;
  rgb_t rgb_in = RGB_BLACK, rgb_out;
  logic mem_en;
  logic [15:0] addr;
  rgb_t stored [LINES + 1][MAXPIX];
  int   npix [LINES + 1];
  int   checks = 0, failures = 0;

  video_memory dut (.clk, .rst_n, .pix_ce, .vblank, .hsync, .count_en, .we_n,
                    .rgb_in, .rgb_out, .mem_en, .addr);

  always #5 clk = ~clk;

  initial begin
    repeat ((VB + LINE * (LINES + 1)) * 4 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mode 0: write random colours, 1: read and check, 2: read, colours must be
  // those of the write field although new random colours are presented
  task automatic field(input int mode);
    int k;
    we_n = (mode == 0) ? 0 : 1;
    count_en = 0;
    vblank = 1;
    repeat (VB) @(negedge clk);
    vblank = 0;
    count_en = 1;
    for (int n = 1; n <= LINES; n++) begin
      k = 0;
      for (int t = 0; t < LINE; t++) begin
        @(negedge clk);
        hsync  = (t < HS);
        pix_ce = (t > 0) && (t % 2 == 1 || t % 7 == 0);
        rgb_in = rgb_t'($urandom);
        #1;
        if (pix_ce && k < MAXPIX) begin
          if (mode == 0) stored[n][k] = rgb_in;
          else if (k >= 4 && k - 4 < (npix[n] / 4) * 4) begin
            checks++;
            if (rgb_out !== stored[n][k - 4]) begin
              failures++;
              $display("FAIL line %0d pixel %0d: got %03b expected %03b", n, k - 4, rgb_out, stored[n][k - 4]);
            end
          end
          k++;
        end
      end
      if (mode == 0) npix[n] = k;
    end
    @(negedge clk) pix_ce = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    field(0);
    field(1);
    field(2);
    checks++;
    if (npix[1] < 40) begin
      failures++;
      $display("FAIL too few pixels per line: %0d", npix[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
