// sub_shift_register: K-bit section of the pulsed-latch shift register.
//
// K data latches in series hold the K bits of the section; a (K+1)-th latch,
// the temporary latch, keeps a copy of the last bit for the next section.
// Each latch has its own delayed pulsed clock. The temporary latch is written
// first (CLK_pulse<T>) and takes the last data bit; then the data latches are
// written from last to first (CLK_pulse<K> ... CLK_pulse<1>), each from the
// latch before it, the first from d. Because every latch is written only
// after the latch it feeds, no latch input changes during its own pulse and
// the chain shifts by exactly one position per pulse sequence. The next
// section's first latch reads t, which stays constant after CLK_pulse<T>.
//
// Interface: clk_pulse_t and clk_pulse[i] (= CLK_pulse<i+1>) from the shared
// generator, differential serial input d/d_b, data q/q_b (q[0] first), and
// the temporary latch t/t_b.
//
// Timing: after one full pulse sequence t holds the old q[K-1], q[i] the old
// q[i-1], and q[0] the value d had during CLK_pulse<1>.
//
// The structure follows the published sub shift register; only the packing
// of the latch outputs into vectors is this design's.
module sub_shift_register #(
  parameter int unsigned K = 4
) (
  input  logic         clk_pulse_t,
  input  logic [K-1:0] clk_pulse,
  input  logic         d,
  input  logic         d_b,
  output logic [K-1:0] q,
  output logic [K-1:0] q_b,
  output logic         t,
  output logic         t_b
);

  // Differential chain: chain[0] is the input, chain[i+1] is latch i.
  logic [K:0] chain, chain_b;

  assign chain[0]   = d;
  assign chain_b[0] = d_b;

  for (genvar i = 0; i < K; i++) begin : g_data
    ssaspl_latch u_latch (
      .clk_pulse (clk_pulse[i]),
      .d         (chain[i]),
      .d_b       (chain_b[i]),
      .q         (chain[i+1]),
      .q_b       (chain_b[i+1])
    );
  end

  // Temporary storage latch.
  ssaspl_latch u_temp (
    .clk_pulse (clk_pulse_t),
    .d         (chain[K]),
    .d_b       (chain_b[K]),
    .q         (t),
    .q_b       (t_b)
  );

  assign q   = chain[K:1];
  assign q_b = chain_b[K:1];

endmodule
