// Shared constants of the LUT-based digital-to-time converter (DTC).
//
// The converter is a chain of N_STAGES two-input multiplexers (one FPGA LUT
// each) whose data inputs A are driven by an (N_STAGES+1)-bit pattern
// register. Bit 0 of the pattern is the Init bit that enters the B input of
// the first multiplexer and sets the level the output settles to once the
// pulse train has left the line. The default sizes are those of the
// published Spartan-6 implementation: 128 LUT multiplexers, a 129-bit
// pattern, and a trigger made by dividing the 50 MHz board clock by 10.
// The per-element delays are used only by the timed behavioural model of the
// line; they are derived from the measured 253 ps mean step and from the
// stretching of a single pulse from about 0.3 ns to 5.5 ns over the line.
package dtc_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  // Number of LUT multiplexers in the delay line.
  localparam int unsigned N_STAGES = 128;
  // Width of the pattern register: one A input per stage plus the Init bit.
  localparam int unsigned PATTERN_BITS = N_STAGES + 1;
  // Division ratio from the 50 MHz clock to the 5 MHz trigger.
  localparam int unsigned TRIG_DIV = 10;
  // Low-to-high and high-to-low propagation time of one delay element, ps.
  localparam int unsigned TPLH_PS = 253;
  localparam int unsigned TPHL_PS = 294;
endpackage
