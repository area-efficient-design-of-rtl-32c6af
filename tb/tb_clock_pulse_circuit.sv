// Self-checking testbench for clock_pulse_circuit.
//
// Two instances (DELAY = 1 and DELAY = 3) are fed a clock with random high
// and low times of at least DELAY reference periods. A reference keeps the
// history of the input and predicts, for every reference period, the delayed
// clock (input DELAY periods earlier) and the pulse (input high, delayed
// clock low). It also checks that every rising edge gives one pulse of
// exactly DELAY periods and that falling edges give none.
module tb_clock_pulse_circuit;

  localparam int unsigned D1 = 1;
  localparam int unsigned D3 = 3;

  logic clk_fast = 1'b0;
  logic rst_n    = 1'b0;
  logic clk_a, clk_b;
  logic out_a, pulse_a, out_b, pulse_b;

  int checks = 0, failures = 0;
  int pulses_a = 0, pulses_b = 0, rises_a = 0, rises_b = 0;

  clock_pulse_circuit #(.DELAY(D1)) dut_a (
    .clk_fast(clk_fast), .rst_n(rst_n), .clk_in(clk_a),
    .clk_out(out_a), .clk_pulse(pulse_a));
  clock_pulse_circuit #(.DELAY(D3)) dut_b (
    .clk_fast(clk_fast), .rst_n(rst_n), .clk_in(clk_b),
    .clk_out(out_b), .clk_pulse(pulse_b));

  always #5 clk_fast = ~clk_fast;

  // Input histories, newest in bit 0, updated together with the inputs.
  logic [7:0] hist_a = '0, hist_b = '0;
  int width_a = 0, width_b = 0;
  int left_a = 1, left_b = 1;

  // Stimulus: hold each level for a random number of periods >= DELAY.
  always @(posedge clk_fast) begin
    if (!rst_n) begin
      clk_a <= 1'b0; clk_b <= 1'b0;
      left_a <= 1;   left_b <= 1;
    end else begin
      if (left_a == 1) begin
        clk_a  <= ~clk_a;
        left_a <= $urandom_range(D1, D1 + 3);
        if (!clk_a) rises_a++;
      end else left_a <= left_a - 1;
      if (left_b == 1) begin
        clk_b  <= ~clk_b;
        left_b <= $urandom_range(D3, D3 + 4);
        if (!clk_b) rises_b++;
      end else left_b <= left_b - 1;
    end
  end

  // Compare in the middle of each reference period.
  always @(negedge clk_fast) begin
    if (rst_n) begin
      logic exp_out_a, exp_out_b;
      hist_a = {hist_a[6:0], clk_a};
      hist_b = {hist_b[6:0], clk_b};
      exp_out_a = hist_a[D1];
      exp_out_b = hist_b[D3];
      checks += 4;
      if (out_a !== exp_out_a) begin failures++; $display("FAIL a clk_out=%b exp %b at %0t", out_a, exp_out_a, $time); end
      if (out_b !== exp_out_b) begin failures++; $display("FAIL b clk_out=%b exp %b at %0t", out_b, exp_out_b, $time); end
      if (pulse_a !== (clk_a & ~exp_out_a)) begin failures++; $display("FAIL a pulse=%b at %0t", pulse_a, $time); end
      if (pulse_b !== (clk_b & ~exp_out_b)) begin failures++; $display("FAIL b pulse=%b at %0t", pulse_b, $time); end
      // Pulse width measurement.
      if (pulse_a) width_a++;
      else if (width_a != 0) begin
        checks++; pulses_a++;
        if (width_a != D1) begin failures++; $display("FAIL a pulse width %0d", width_a); end
        width_a = 0;
      end
      if (pulse_b) width_b++;
      else if (width_b != 0) begin
        checks++; pulses_b++;
        if (width_b != D3) begin failures++; $display("FAIL b pulse width %0d", width_b); end
        width_b = 0;
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk_a = 1'b0; clk_b = 1'b0;
    repeat (3) @(posedge clk_fast);
    checks++;
    if (pulse_a !== 1'b0 || pulse_b !== 1'b0 || out_a !== 1'b0 || out_b !== 1'b0) begin
      failures++; $display("FAIL reset state");
    end
    @(negedge clk_fast) rst_n = 1'b1;
    repeat (2000) @(posedge clk_fast);
    @(negedge clk_fast);
    // One pulse per rising edge (the last one may still be running).
    checks += 2;
    if (pulses_a < rises_a - 1 || pulses_a > rises_a || rises_a < 50) begin
      failures++; $display("FAIL a: %0d pulses for %0d rising edges", pulses_a, rises_a);
    end
    if (pulses_b < rises_b - 1 || pulses_b > rises_b || rises_b < 50) begin
      failures++; $display("FAIL b: %0d pulses for %0d rising edges", pulses_b, rises_b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
