// Self-checking testbench for delayed_pulsed_clock_gen.
//
// Two generators are run: the default one (K = 4, DELAY = 1) and one with
// K = 3, DELAY = 2. Each gets a clock with a random period of at least
// (K+1)*DELAY reference periods. For every reference period the testbench
// works out from the time since the last rising clock edge which pulse must
// be high: CLK_pulse<T> in the first DELAY periods, then CLK_pulse<K>, ...,
// CLK_pulse<1>, each for DELAY periods, and none after that. It counts how
// often each pulse was seen so that a pulse that never fires is a failure.
module tb_delayed_pulsed_clock_gen;

  localparam int unsigned KA = 4, DA = 1;
  localparam int unsigned KB = 3, DB = 2;

  logic clk_fast = 1'b0;
  logic rst_n    = 1'b0;
  logic clk_a = 1'b0, clk_b = 1'b0;
  logic          pt_a, pt_b;
  logic [KA-1:0] p_a;
  logic [KB-1:0] p_b;

  int checks = 0, failures = 0;
  int seen_a [KA+1];
  int seen_b [KB+1];

  delayed_pulsed_clock_gen dut_a (
    .clk_fast(clk_fast), .rst_n(rst_n), .clk(clk_a),
    .clk_pulse_t(pt_a), .clk_pulse(p_a));
  delayed_pulsed_clock_gen #(.K(KB), .DELAY(DB)) dut_b (
    .clk_fast(clk_fast), .rst_n(rst_n), .clk(clk_b),
    .clk_pulse_t(pt_b), .clk_pulse(p_b));

  always #5 clk_fast = ~clk_fast;

  // Clock generators: random high and low times, period >= (K+1)*DELAY.
  int since_a = 1000, since_b = 1000;   // periods since the last rising edge
  int hi_a = 0, hi_b = 0, per_a = 0, per_b = 0;

  always @(posedge clk_fast) begin
    if (rst_n) begin
      since_a <= since_a + 1;
      if (since_a + 1 == hi_a) clk_a <= 1'b0;
      if (since_a + 1 >= per_a) begin
        clk_a   <= 1'b1;
        since_a <= 0;
        hi_a    <= $urandom_range(DA, KA * DA);
        per_a   <= $urandom_range((KA + 1) * DA, (KA + 1) * DA + 6);
      end
      since_b <= since_b + 1;
      if (since_b + 1 == hi_b) clk_b <= 1'b0;
      if (since_b + 1 >= per_b) begin
        clk_b   <= 1'b1;
        since_b <= 0;
        hi_b    <= $urandom_range(DB, KB * DB);
        per_b   <= $urandom_range((KB + 1) * DB, (KB + 1) * DB + 6);
      end
    end
  end

  // Expected pulse vector, bit 0 = T, bit j = CLK_pulse<K+1-j>.
  function automatic logic [7:0] expected(int since, int k, int dly);
    expected = '0;
    if (since < (k + 1) * dly) expected[since / dly] = 1'b1;
  endfunction

  always @(negedge clk_fast) begin
    if (rst_n) begin
      logic [7:0] got_a, got_b, exp_a, exp_b;
      got_a = '0; got_b = '0;
      got_a[0] = pt_a;
      for (int i = 0; i < KA; i++) got_a[KA - i] = p_a[i];
      got_b[0] = pt_b;
      for (int i = 0; i < KB; i++) got_b[KB - i] = p_b[i];
      exp_a = expected(since_a, KA, DA);
      exp_b = expected(since_b, KB, DB);
      checks += 2;
      if (got_a !== exp_a) begin
        failures++;
        $display("FAIL A at %0t: since=%0d got %b expected %b", $time, since_a, got_a, exp_a);
      end
      if (got_b !== exp_b) begin
        failures++;
        $display("FAIL B at %0t: since=%0d got %b expected %b", $time, since_b, got_b, exp_b);
      end
      for (int j = 0; j <= KA; j++) if (got_a[j]) seen_a[j]++;
      for (int j = 0; j <= KB; j++) if (got_b[j]) seen_b[j]++;
    end
  end

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen_a[j]) seen_a[j] = 0;
    foreach (seen_b[j]) seen_b[j] = 0;
    repeat (3) @(posedge clk_fast);
    checks++;
    if (pt_a || p_a != '0 || pt_b || p_b != '0) begin
      failures++; $display("FAIL pulses during reset");
    end
    @(negedge clk_fast) rst_n = 1'b1;
    repeat (3000) @(posedge clk_fast);
    for (int j = 0; j <= KA; j++) begin
      checks++;
      if (seen_a[j] < 10) begin failures++; $display("FAIL A pulse %0d seen %0d times", j, seen_a[j]); end
    end
    for (int j = 0; j <= KB; j++) begin
      checks++;
      if (seen_b[j] < 10) begin failures++; $display("FAIL B pulse %0d seen %0d times", j, seen_b[j]); end
    end
    $display("pulse periods seen A: T=%0d then %0d %0d %0d %0d", seen_a[0], seen_a[1], seen_a[2], seen_a[3], seen_a[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
