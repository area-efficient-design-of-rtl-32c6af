// clock_pulse_circuit: one stage of the delayed pulsed clock generator.
//
// The stage delays its clock input through a delay element followed by two
// inverters. The node after the first inverter is the inverted, delayed clock;
// an AND gate combines it with the undelayed input, so each rising edge of
// clk_in gives one pulse exactly one delay wide (a falling edge gives none).
// The node after the second inverter is the delayed clock, which feeds the
// next stage. Because the pulse comes from an AND of two delayed copies rather
// than from a long inverter chain, it can be much narrower than the total
// rise and fall time of the chain.
//
// Interface: clk_fast clocks the delay element, rst_n clears it
// asynchronously, clk_in is the stage input, clk_out the delayed clock for the
// next stage and clk_pulse the buffered pulse.
//
// Timing: clk_pulse rises together with clk_in and falls DELAY clk_fast
// periods later, when clk_out rises. clk_in must change only on rising edges
// of clk_fast and stay at each level for at least DELAY periods.
//
// The AND-of-delayed-clocks structure and the clock buffer follow the
// published circuit. The delay element there is an analog inverter delay;
// here it is a chain of DELAY flip-flops on a faster reference clock, which is
// this design's synchronous stand-in for it. The clock buffer is a wire.
module clock_pulse_circuit #(
  parameter int unsigned DELAY = 1
) (
  input  logic clk_fast,
  input  logic rst_n,
  input  logic clk_in,
  output logic clk_out,
  output logic clk_pulse
);

  logic [DELAY-1:0] delay_line;
  logic             delayed_n;   // node after the first inverter

  // Delay element: clk_in shifted by DELAY periods of clk_fast.
  if (DELAY == 1) begin : g_single
    always_ff @(posedge clk_fast or negedge rst_n) begin
      if (!rst_n) delay_line <= '0;
      else        delay_line <= clk_in;
    end
  end else begin : g_chain
    always_ff @(posedge clk_fast or negedge rst_n) begin
      if (!rst_n) delay_line <= '0;
      else        delay_line <= {delay_line[DELAY-2:0], clk_in};
    end
  end

  assign delayed_n = ~delay_line[DELAY-1];
  assign clk_out   = ~delayed_n;
  // AND gate of the undelayed and the inverted delayed clock, then buffer.
  assign clk_pulse = clk_in & delayed_n;

endmodule
