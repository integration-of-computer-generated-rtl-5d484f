// Self-checking testbench for the video memory address generator at its
// default size (8 block selects). Pixel enables arrive every 2 or 3 clocks,
// lines are 60 clocks and a field has 135 lines, so every 4K block select is
// reached. COUNT EN is off for the first lines of each field and for a few
// random lines. Checked on every clock: MEM EN on the 4th, 8th, ... pixel
// after each sync edge; at MEM EN the address equals {lines counted, blocks
// counted} and the block select is the one-hot decode of A15..A12.
module tb_vmem_addr_gen;
  localparam int NB = 8, LINE = 60, HS = 4, VB = 150, LINES = 135, FIELDS = 2;
  logic clk = 0, rst_n = 0;
  logic pix_ce = 0, vblank = 0, hsync = 0, count_en = 0;
  logic mem_en;
  logic [15:0] addr;
  logic [11:0] chip_addr;
  logic [NB-1:0] bank_sel;
  int checks = 0, failures = 0, n_mem_en = 0;
  int ce_since = 0, blocks = 0, lines = 0;
  logic hs_prev = 0;
  bit   banks_seen [NB];

  vmem_addr_gen dut (.clk, .rst_n, .pix_ce, .vblank, .hsync, .count_en,
                   .mem_en, .addr, .chip_addr, .bank_sel);

  always #5 clk = ~clk;

  initial begin
    repeat ((VB + LINE * (LINES + 2)) * (FIELDS + 1)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0h expected %0h", what, $time, got, exp);
    end
  endtask

  // One clock: apply inputs after a falling edge, check, advance the reference.
  int gap = 0;
  task automatic step(input logic vb, input logic hs, input logic ce_ok);
    logic rise, exp_en;
    @(negedge clk);
    vblank = vb;
    hsync  = hs;
    gap    = (gap == 0) ? $urandom_range(1, 2) : gap - 1;
    pix_ce = ce_ok && (gap == 0);
    #1;
    rise   = hsync && !hs_prev;
    exp_en = pix_ce && !vblank && !rise && (ce_since % 4 == 3);
    check("mem_en", mem_en, exp_en);
    if (mem_en) begin
      n_mem_en++;
      check("address", addr, {8'(lines), 8'(blocks)});
      check("chip address", chip_addr, addr[11:0]);
      check("block select", bank_sel, (addr[15:12] < NB) ? (1 << addr[15:12]) : 0);
      if (addr[15:12] < NB) banks_seen[addr[15:12]] = 1;
    end
    if (vblank) begin
      ce_since = 0; blocks = 0; lines = 0;
    end else if (rise) begin
      ce_since = 0; blocks = 0;
      if (count_en) lines++;
    end else if (pix_ce) begin
      ce_since++;
      if (exp_en && count_en) blocks++;
    end
    hs_prev = hsync;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int f = 0; f < FIELDS; f++) begin
      count_en = 0;
      for (int t = 0; t < VB; t++) step(1, t % LINE < HS, 1);
      for (int n = 1; n <= LINES; n++) begin
        count_en = (n > 2) && ($urandom_range(0, 15) != 0);
        for (int t = 0; t < LINE; t++) step(0, t < HS, 1);
      end
    end
    foreach (banks_seen[i]) check("block select reached", banks_seen[i], 1);
    check("mem_en seen", n_mem_en > 1000, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
