// Self-checking testbench for the RGB input interface comparator model.
// Sweeps each input over levels around the 0.4 V colour threshold and the
// 0.0 V sync threshold and compares each output with the expected slice.
module tb_input_interface;
  real  rv, gv, bv;
  logic r, g, b, cs;
  int   checks = 0, failures = 0;

  input_interface dut (.red_v(rv), .green_v(gv), .blue_v(bv),
                       .red(r), .green(g), .blue(b), .csync(cs));

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b (r=%f g=%f b=%f)", what, got, exp, rv, gv, bv);
    end
  endtask

  real levels [10] = '{-0.3, -0.01, 0.0, 0.01, 0.3, 0.35, 0.39, 0.41, 0.5, 0.7};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (levels[i]) foreach (levels[j]) begin
      rv = levels[i];
      gv = levels[j];
      bv = levels[9 - i];
      #10;
      check("red",   r,  levels[i] > 0.4);
      check("blue",  b,  levels[9 - i] > 0.4);
      check("green", g,  levels[j] > 0.4);
      check("csync", cs, levels[j] <= 0.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
