// delayed_pulsed_clock_gen: produces the K+1 non-overlapping delayed pulsed
// clocks that drive every sub shift register.
//
// K+1 clock-pulse circuits are chained: the first takes the system clock CLK
// and gives CLK_pulse<T> plus the delayed clock CLK<1>; the stage fed by
// CLK<1> gives CLK_pulse<K>, and so on down to the stage fed by CLK<K>, which
// gives CLK_pulse<1>. Each rising edge of CLK therefore produces, in this
// order, CLK_pulse<T>, CLK_pulse<K>, ..., CLK_pulse<1>: the reverse of the
// order of the latches they write, so each latch is written after the latch
// it feeds has already taken its old value.
//
// Interface: clk_fast and rst_n for the delay elements, clk the shift clock,
// clk_pulse_t = CLK_pulse<T>, clk_pulse[i] = CLK_pulse<i+1>.
//
// Timing: pulse j (j = 0 for T, j = 1 for CLK_pulse<K>, ... j = K for
// CLK_pulse<1>) is high from DELAY*j to DELAY*(j+1) clk_fast periods after
// the CLK rising edge. One pulse falls as the next rises; they never overlap.
// CLK needs a period of at least (K+1)*DELAY clk_fast periods.
//
// The chain structure and the pulse order follow the published generator;
// the synchronous delay elements are this design's choice (see
// clock_pulse_circuit). The last stage's delayed clock has no user and is
// left open.
module delayed_pulsed_clock_gen #(
  parameter int unsigned K     = 4,
  parameter int unsigned DELAY = 1
) (
  input  logic         clk_fast,
  input  logic         rst_n,
  input  logic         clk,
  output logic         clk_pulse_t,
  output logic [K-1:0] clk_pulse
);

  // stage_clk[0] = CLK, stage_clk[j] = CLK<j>; stage_clk[K+1], the delayed
  // clock out of the last stage, has no user.
  logic [K+1:0] stage_clk;
  logic [K:0]   stage_pulse;

  assign stage_clk[0] = clk;

  for (genvar j = 0; j <= K; j++) begin : g_stage
    clock_pulse_circuit #(.DELAY(DELAY)) u_cpc (
      .clk_fast  (clk_fast),
      .rst_n     (rst_n),
      .clk_in    (stage_clk[j]),
      .clk_out   (stage_clk[j+1]),
      .clk_pulse (stage_pulse[j])
    );
  end

  // Stage 0 is the temporary-latch pulse; stage j >= 1 drives CLK_pulse<K+1-j>.
  assign clk_pulse_t = stage_pulse[0];
  for (genvar i = 0; i < K; i++) begin : g_map
    assign clk_pulse[i] = stage_pulse[K-i];
  end

  // The pulses never overlap (also true during reset, when only
  // CLK_pulse<T> can be high).
  a_no_overlap: assert property (@(posedge clk_fast) $onehot0(stage_pulse))
    else $error("delayed pulsed clocks overlap: %b", stage_pulse);

endmodule
