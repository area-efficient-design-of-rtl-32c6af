// ssaspl_latch: static sense-amplifier pulsed latch with a shared pulse
// generator, the storage cell of the pulsed-latch shift register.
//
// The cell is a pair of cross-coupled inverters holding Q and Qb, with a
// differential pull-down underneath: one clocked transistor driven by the
// shared pulsed clock, and above it one transistor gated by D on the Qb side
// and one gated by Db on the Q side. While clk_pulse is high, D=1/Db=0 pulls
// Qb low so Q becomes 1, and D=0/Db=1 pulls Q low so Q becomes 0. While
// clk_pulse is low the inverter pair keeps its value. The pulse generator is
// not part of the cell: it is shared by every latch of the register.
//
// Interface: clk_pulse (enable), d/d_b (differential data, normally the q/q_b
// of the previous latch), q/q_b (differential state).
//
// Timing: level sensitive. The output follows the input for as long as
// clk_pulse is high, so d/d_b must stay constant during the pulse; the
// shift register around the cell guarantees that by ordering the pulses.
//
// The transistor structure follows the published cell. Holding the value when
// both rails are equal (not a legal input) and the absence of a reset are this
// model's choices; the cell powers up with an unknown value.
module ssaspl_latch (
  input  logic clk_pulse,
  input  logic d,
  input  logic d_b,
  output logic q,
  output logic q_b
);

  logic state;

  // Level-sensitive write through the differential pull-down.
  always_latch begin
    if (clk_pulse && (d != d_b)) state = d;
  end

  assign q   = state;
  assign q_b = ~state;

endmodule
