// Self-checking testbench for ssaspl_latch.
//
// Drives random pulse/data combinations, including the illegal equal-rail
// case, and compares q and q_b with a reference value kept by the testbench:
// while the pulse is high and the rails differ the reference takes d,
// otherwise it keeps its value. Also checks that a change of d while the
// pulse is low does not reach q, and that a change during the pulse does.
module tb_ssaspl_latch;

  logic clk_pulse, d, d_b, q, q_b;
  logic ref_q;
  int   checks = 0, failures = 0;
  int   captures = 0, holds = 0;

  ssaspl_latch dut (.clk_pulse(clk_pulse), .d(d), .d_b(d_b), .q(q), .q_b(q_b));

  task automatic check(input string what);
    checks++;
    if (q !== ref_q || q_b !== ~ref_q) begin
      failures++;
      $display("FAIL %s: pulse=%b d=%b d_b=%b q=%b q_b=%b expected q=%b",
               what, clk_pulse, d, d_b, q, q_b, ref_q);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Initialise the cell with a defined value.
    clk_pulse = 1'b1; d = 1'b0; d_b = 1'b1; #1;
    ref_q = 1'b0;
    check("init 0");
    d = 1'b1; d_b = 1'b0; #1;
    ref_q = 1'b1;
    check("transparent 1");
    clk_pulse = 1'b0; #1;
    d = 1'b0; d_b = 1'b1; #1;
    check("hold after pulse");
    clk_pulse = 1'b1; #1;
    ref_q = 1'b0;
    check("write 0");
    clk_pulse = 1'b0; #1;

    repeat (400) begin
      logic [2:0] r;
      r = 3'($urandom);
      clk_pulse = r[2];
      d         = r[1];
      // Mostly legal differential input, sometimes equal rails.
      d_b       = ($urandom_range(0, 7) == 0) ? r[1] : ~r[1];
      #1;
      if (clk_pulse && d != d_b) begin
        ref_q = d;
        captures++;
      end else begin
        holds++;
      end
      check("random");
      #1;
    end
    if (captures == 0 || holds == 0) begin
      failures++;
      $display("FAIL coverage: captures=%0d holds=%0d", captures, holds);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
