// End-to-end testbench for pulsed_latch_shift_register in a second
// configuration: N = 24 bits in eight sections of K = 3 bits, with delay
// elements of DELAY = 2 reference periods, so each pulse is two periods wide
// and a shift takes (K+1)*DELAY = 8 periods.
//
// The checks are those of the default-size testbench: a latch-level reference
// that applies each pulsed clock's update in the period it starts and is
// compared with the whole register in every period, a bit-history reference
// for every completed shift, a latency check one period before CLK_pulse<1>,
// and counters that fail the run if a pulse, a temporary-latch capture, a
// hand-over of 0 or 1 between sections, either value at shift_out, or a
// shift at the minimum clock period never occurred.
module tb_pulsed_latch_shift_register_k3;

  localparam int unsigned N     = 24;
  localparam int unsigned K     = 3;
  localparam int unsigned DELAY = 2;
  localparam int unsigned M     = N / K;
  localparam int unsigned SEQ   = (K + 1) * DELAY;   // periods per shift
  localparam int unsigned SHIFTS = 400;

  logic         clk_fast = 1'b0;
  logic         rst_n    = 1'b0;
  logic         clk      = 1'b0;
  logic         in       = 1'b0;
  logic [N-1:0] q;
  logic         shift_out;
  logic         pt;
  logic [K-1:0] p;

  pulsed_latch_shift_register #(.N(N), .K(K), .DELAY(DELAY)) dut (
    .clk_fast(clk_fast), .rst_n(rst_n), .clk(clk), .in(in),
    .q(q), .shift_out(shift_out), .clk_pulse_t(pt), .clk_pulse(p));

  always #5 clk_fast = ~clk_fast;

  int checks = 0, failures = 0;

  // ---------------- stimulus ----------------
  int since = 1000, hi = 0, per = 0;
  int edges = 0;
  logic [N+1:0] history = '0;        // history[0] = newest applied bit
  bit running = 0;

  always @(posedge clk_fast) begin
    if (running) begin
      since <= since + 1;
      if (since + 1 == hi) clk <= 1'b0;
      if (since + 1 >= per) begin
        logic b;
        b        = 1'($urandom);
        clk     <= 1'b1;
        in      <= b;
        since   <= 0;
        hi      <= $urandom_range(DELAY, K * DELAY);
        per     <= ($urandom_range(0, 2) == 0) ? SEQ : $urandom_range(SEQ, SEQ + 5);
        history <= {history[N:0], b};
        edges   <= edges + 1;
      end
    end
  end

  // ---------------- reference and checks ----------------
  logic [N-1:0] ref_q = '0;
  logic [M-1:0] ref_t = '0;
  int seen_pulse [K+1];
  int temp_captures = 0, handover0 = 0, handover1 = 0, out0 = 0, out1 = 0;
  int min_period_shifts = 0, complete_shifts = 0;
  int last_edge_time = 0;

  always @(negedge clk_fast) begin
    if (running && edges > 0) begin
      logic [7:0] got, exp;
      // Which pulse must be high now.
      got = '0; exp = '0;
      got[0] = pt;
      for (int i = 0; i < K; i++) got[K - i] = p[i];
      if (since < SEQ) exp[since / DELAY] = 1'b1;
      for (int j = 0; j <= K; j++) if (got[j]) seen_pulse[j]++;
      checks++;
      if (got !== exp) begin
        failures++;
        $display("FAIL pulses at %0t: since=%0d got %b expected %b", $time, since, got, exp);
      end

      // Apply the update of the pulse that starts in this period.
      if (since < SEQ && since % DELAY == 0) begin
        int j;
        j = since / DELAY;
        if (j == 0) begin
          for (int m = 0; m < M; m++) begin
            if (ref_t[m] != ref_q[m*K + K - 1]) temp_captures++;
            ref_t[m] = ref_q[m*K + K - 1];
          end
        end else begin
          int i;
          i = K - j;                      // local latch index written now
          for (int m = 0; m < M; m++) begin
            if (i == 0) begin
              ref_q[m*K] = (m == 0) ? in : ref_t[m-1];
              if (m > 0 && edges > N + 2) begin
                if (ref_t[m-1]) handover1++; else handover0++;
              end
            end else begin
              ref_q[m*K + i] = ref_q[m*K + i - 1];
            end
          end
        end
      end

      // Compare every period once all latches hold applied data.
      if (edges > N + 2) begin
        checks++;
        if (q !== ref_q || shift_out !== ref_t[M-1]) begin
          failures++;
          $display("FAIL state at %0t: since=%0d q=%h out=%b expected q=%h out=%b",
                   $time, since, q, shift_out, ref_q, ref_t[M-1]);
        end
        // Completed shift: in the last period of CLK_pulse<1> every latch
        // holds its new value.
        if (since == SEQ - 1) begin
          checks++;
          complete_shifts++;
          if (shift_out) out1++; else out0++;
          if (q !== history[N-1:0] || shift_out !== history[N]) begin
            failures++;
            $display("FAIL shift result at %0t: q=%h out=%b expected q=%h out=%b",
                     $time, q, shift_out, history[N-1:0], history[N]);
          end
        end
        // Latency: in the last period before CLK_pulse<1> the first latch
        // still holds its old value while the second already holds a copy.
        if (since == SEQ - DELAY - 1) begin
          checks++;
          if (q[0] !== history[1] || q[1] !== history[1]) begin
            failures++;
            $display("FAIL latency at %0t: q[1:0]=%b expected %b%b", $time, q[1:0],
                     history[1], history[1]);
          end
        end
        if (since == 0 && per == SEQ) min_period_shifts++;
      end
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen_pulse[j]) seen_pulse[j] = 0;
    // Reset: no pulse may be produced while the clock is held low.
    repeat (3) @(posedge clk_fast);
    checks++;
    if (pt !== 1'b0 || p !== '0) begin
      failures++; $display("FAIL pulses during reset");
    end
    @(negedge clk_fast) rst_n = 1'b1;
    @(negedge clk_fast) running = 1;
    wait (edges == SHIFTS);
    repeat (2 * SEQ + 2) @(negedge clk_fast);

    $display("periods with CLK_pulse<T> high: %0d", seen_pulse[0]);
    for (int j = 1; j <= K; j++)
      $display("periods with CLK_pulse<%0d> high: %0d", K + 1 - j, seen_pulse[j]);
    $display("complete shifts=%0d temp captures=%0d hand-overs 0/1=%0d/%0d shift_out 0/1=%0d/%0d min-period shifts=%0d",
             complete_shifts, temp_captures, handover0, handover1, out0, out1, min_period_shifts);
    for (int j = 0; j <= K; j++) begin
      checks++;
      if (seen_pulse[j] == 0) begin failures++; $display("FAIL pulse %0d never fired", j); end
    end
    checks += 6;
    if (temp_captures == 0)     begin failures++; $display("FAIL no temporary latch capture"); end
    if (handover0 == 0)         begin failures++; $display("FAIL no 0 handed between sections"); end
    if (handover1 == 0)         begin failures++; $display("FAIL no 1 handed between sections"); end
    if (out0 == 0 || out1 == 0) begin failures++; $display("FAIL shift_out never gave both values"); end
    if (min_period_shifts == 0) begin failures++; $display("FAIL no shift at the minimum period"); end
    if (complete_shifts < SHIFTS - N - 4) begin failures++; $display("FAIL only %0d complete shifts", complete_shifts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
