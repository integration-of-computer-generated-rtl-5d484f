// Self-checking testbench for one colour data path of the video memory at its
// default size (8 chips). The testbench plays the address generator: MEM EN on
// every 4th pixel enable and a scattered address sequence over all chips.
// It writes random pixels for 600 blocks with /W low, then reads the same
// addresses with /W high and checks that each block comes back out, one pixel
// per pixel enable, in the order it went in.
module tb_vmem_color_path;
  localparam int NB = 8, BLOCKS = 600;
  logic clk = 0, rst_n = 0;
  logic pix_ce = 0, mem_en = 0, we_n = 1, pix_in = 0, pix_out;
  logic [11:0] chip_addr = '0;
  logic [NB-1:0] bank_sel = '0;
  logic [3:0] data [BLOCKS];
  int checks = 0, failures = 0;

  vmem_color_path dut (.clk, .rst_n, .pix_ce, .mem_en, .we_n, .pix_in,
                     .chip_addr, .bank_sel, .pix_out);

  always #5 clk = ~clk;

  initial begin
    repeat (BLOCKS * 4 * 4 * 2 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [11:0] word_of(int b);
    return 12'((b * 37) % 4096);
  endfunction

  // One pixel: idle clocks, then one clock with pix_ce (and mem_en on the 4th).
  task automatic pixel(input int b, input int k, input logic bit_in, output logic seen);
    repeat ($urandom_range(1, 2)) begin
      @(negedge clk);
      pix_ce = 0; mem_en = 0;
    end
    @(negedge clk);
    pix_ce    = 1;
    mem_en    = (k == 3);
    pix_in    = bit_in;
    chip_addr = word_of(b);
    bank_sel  = NB'(1) << (b % NB);
    #1 seen = pix_out;
  endtask

  initial begin
    logic seen;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    we_n = 0;
    for (int b = 0; b < BLOCKS; b++) begin
      data[b] = 4'($urandom);
      for (int k = 0; k < 4; k++) pixel(b, k, data[b][3 - k], seen);
    end
    @(negedge clk) pix_ce = 0; mem_en = 0;
    repeat (5) @(negedge clk);
    we_n = 1;
    // the first read block is loaded on its MEM EN; its pixels show while the
    // next block's pixels are counted
    for (int b = 0; b <= BLOCKS; b++) begin
      for (int k = 0; k < 4; k++) begin
        pixel(b < BLOCKS ? b : 0, k, 1'b0, seen);
        if (b > 0) begin
          checks++;
          if (seen !== data[b - 1][3 - k]) begin
            failures++;
            $display("FAIL block %0d pixel %0d: got %0b expected %0b", b - 1, k, seen, data[b - 1][3 - k]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
