// pulsed_latch_shift_register: N-bit serial-in shift register built from
// pulsed latches instead of master-slave flip-flops.
//
// A pulsed latch (a latch written by a short clock pulse) is about half the
// size of a flip-flop, but a chain of latches sharing one pulse fails: a
// latch's input changes during its own pulse because the latch before it is
// transparent at the same time. This register splits the N bits into N/K
// sections (sub_shift_register) of K data latches plus one temporary latch,
// and drives them with K+1 non-overlapping delayed pulses from one shared
// generator (delayed_pulsed_clock_gen). Within a section the pulses run from
// the last latch to the first, so each latch is written after the latch it
// feeds. Across sections the temporary latch, written by the first pulse,
// carries the section's last bit into the next section's first latch. Only
// K+1 pulsed clocks are needed whatever N is.
//
// Interface: clk_fast and rst_n for the generator's delay elements, clk the
// shift clock (one shift per rising edge), in the serial input, q the
// contents (q[0] = newest bit, q[N-1] = oldest), shift_out the bit pushed out
// of q[N-1] by the last shift, clk_pulse_t/clk_pulse the pulsed clocks for
// observation.
//
// Timing: a shift starts at a rising edge of clk and is complete
// (K+1)*DELAY clk_fast periods later; in must be stable while CLK_pulse<1>
// is high, i.e. from K*DELAY to (K+1)*DELAY clk_fast periods after the edge.
// clk must change on rising edges of clk_fast with a period of at least
// (K+1)*DELAY clk_fast periods.
//
// N = 16 and K = 4 are the published sizes. The single-ended input buffered
// into a differential pair, the open temporary latch of the last section
// brought out as shift_out, the parallel output, and the synchronous delay
// elements are this design's choices.
module pulsed_latch_shift_register #(
  parameter int unsigned N     = 16,
  parameter int unsigned K     = 4,
  parameter int unsigned DELAY = 1
) (
  input  logic         clk_fast,
  input  logic         rst_n,
  input  logic         clk,
  input  logic         in,
  output logic [N-1:0] q,
  output logic         shift_out,
  output logic         clk_pulse_t,
  output logic [K-1:0] clk_pulse
);

  localparam int unsigned M = N / K;

  if (N % K != 0) begin : g_bad_size
    $error("N (%0d) must be a multiple of K (%0d)", N, K);
  end

  delayed_pulsed_clock_gen #(.K(K), .DELAY(DELAY)) u_gen (
    .clk_fast    (clk_fast),
    .rst_n       (rst_n),
    .clk         (clk),
    .clk_pulse_t (clk_pulse_t),
    .clk_pulse   (clk_pulse)
  );

  // link[m] feeds section m; link[m+1] is section m's temporary latch.
  logic [M:0]   link, link_b;
  logic [N-1:0] q_b_unused;

  assign link[0]   = in;
  assign link_b[0] = ~in;

  for (genvar m = 0; m < M; m++) begin : g_sub
    sub_shift_register #(.K(K)) u_sub (
      .clk_pulse_t (clk_pulse_t),
      .clk_pulse   (clk_pulse),
      .d           (link[m]),
      .d_b         (link_b[m]),
      .q           (q[m*K +: K]),
      .q_b         (q_b_unused[m*K +: K]),
      .t           (link[m+1]),
      .t_b         (link_b[m+1])
    );
  end

  assign shift_out = link[M];   // link_b[M] has no user

endmodule
