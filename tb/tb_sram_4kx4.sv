// Self-checking testbench for one 4K x 4 memory chip: writes random words to
// every address, reads them back, and checks that a deselected chip or a chip
// being written drives 0 on its read bus.
module tb_sram_4kx4;
  logic clk = 0;
  logic cs = 0, we_n = 1;
  logic [11:0] addr = '0;
  logic [3:0]  wdata = '0, rdata;
  logic [3:0]  ref_mem [4096];
  int   checks = 0, failures = 0;

  sram_4kx4 dut (.clk, .cs, .we_n, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s addr %0h: got %0h expected %0h", what, addr, got, exp);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int a = 0; a < 4096; a++) begin
      ref_mem[a] = 4'($urandom);
      cs = 1; we_n = 0; addr = 12'(a); wdata = ref_mem[a];
      @(negedge clk);
      check("rdata while writing", rdata, 0);
    end
    we_n = 1;
    for (int a = 0; a < 4096; a++) begin
      addr = 12'(a);
      cs = 1;
      #1 check("read", rdata, ref_mem[a]);
      cs = 0;
      #1 check("deselected", rdata, 0);
    end
    // writes with cs low must not change anything
    @(negedge clk);
    cs = 0; we_n = 0;
    for (int a = 0; a < 64; a++) begin
      addr = 12'(a * 64); wdata = ~ref_mem[a * 64];
      @(negedge clk);
    end
    cs = 1; we_n = 1;
    for (int a = 0; a < 64; a++) begin
      addr = 12'(a * 64);
      #1 check("unselected write", rdata, ref_mem[a * 64]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
