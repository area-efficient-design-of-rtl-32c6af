// Self-checking testbench for sub_shift_register.
//
// The testbench plays the role of the pulse generator: for each shift it
// raises CLK_pulse<T>, then CLK_pulse<K> down to CLK_pulse<1>, one at a time,
// and after every pulse compares the K data latches and the temporary latch
// with a reference that applies the same single-latch update. The serial
// input is random and is changed between shifts. A few leading shifts fill
// the section so that every latch holds a defined value before it is checked.
module tb_sub_shift_register;

  localparam int unsigned K = 4;

  logic         pt;
  logic [K-1:0] p;
  logic         d;
  logic [K-1:0] q, q_b;
  logic         t, t_b;

  logic [K-1:0] ref_q;
  logic         ref_t;
  int checks = 0, failures = 0;
  int temp_updates = 0;

  sub_shift_register #(.K(K)) dut (
    .clk_pulse_t(pt), .clk_pulse(p), .d(d), .d_b(~d),
    .q(q), .q_b(q_b), .t(t), .t_b(t_b));

  task automatic compare(input string what, input bit full);
    checks++;
    if (q !== ref_q || q_b !== ~ref_q || (full && (t !== ref_t || t_b !== ~ref_t))) begin
      failures++;
      $display("FAIL %s: q=%b t=%b expected q=%b t=%b", what, q, t, ref_q, ref_t);
    end
  endtask

  task automatic shift(input logic bit_in, input bit full);
    d = bit_in;
    #2;
    pt = 1'b1; #2; pt = 1'b0; #1;
    if (ref_t != ref_q[K-1]) temp_updates++;
    ref_t = ref_q[K-1];
    if (full) compare("after T", full);
    for (int i = K - 1; i >= 0; i--) begin
      p[i] = 1'b1; #2; p[i] = 1'b0; #1;
      ref_q[i] = (i == 0) ? bit_in : ref_q[i-1];
      if (full) compare($sformatf("after pulse %0d", i + 1), full);
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
    pt = 1'b0; p = '0; d = 1'b0;
    ref_q = '0; ref_t = 1'b0;
    // Fill: K+1 shifts define every latch.
    repeat (K + 1) shift(1'b0, 0);
    compare("after fill", 1);
    repeat (300) shift(1'($urandom), 1);
    checks++;
    if (temp_updates < 20) begin
      failures++; $display("FAIL temporary latch changed only %0d times", temp_updates);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
