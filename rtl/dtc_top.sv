// Digital-to-time converter (DTC) top level.
//
// A pulse train is described as a bit pattern and produced by a chain of
// N_STAGES LUT multiplexers: while the trigger is low every multiplexer shows
// its pattern bit; when the trigger rises they all switch to their
// neighbour's output at once and the pattern slides out of the last
// multiplexer, one element delay per bit, most significant bit first, the
// output then settling at the Init bit (pattern bit 0). The trigger is the
// system clock divided by TRIG_DIV; each falling trigger edge returns the
// line to idle, so with the defaults a new train starts every 200 ns.
//
// Interface: clk is the system clock (50 MHz in the published set-up),
// rst_n a synchronous active-low reset. A new pattern is written on a rising
// clk edge with pattern_load high; it should be written while trigger_out is
// low. trigger_out is the trigger (the oscilloscope reference), taps the
// output of every element, dtc_out the converter output.
//
// With TIMING_MODEL = 0 (default) the delay line is the synthesizable
// multiplexer chain, which in simulation has no delay. With TIMING_MODEL = 1
// it is replaced by the timed behavioural model, for simulation only, which
// shows the pulse train in time; taps are then not modelled and read 0.
// Structure and sizes follow the published design; the load port, the reset
// and the model switch are this implementation's choices.
module dtc_top #(
  parameter int unsigned N_STAGES     = dtc_pkg::N_STAGES,
  parameter int unsigned TRIG_DIV     = dtc_pkg::TRIG_DIV,
  parameter bit          TIMING_MODEL = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pattern_load,
  input  logic [N_STAGES:0] pattern_in,
  output logic [N_STAGES:0] pattern,
  output logic              trigger_out,
  output logic [N_STAGES:1] taps,
  output logic              dtc_out
);
  timeunit 1ps;
  timeprecision 1ps;

  dtc_pattern_register #(.PATTERN_BITS(N_STAGES + 1)) u_pattern (
    .clk        (clk),
    .rst_n      (rst_n),
    .load       (pattern_load),
    .pattern_in (pattern_in),
    .pattern    (pattern)
  );

  dtc_trigger_divider #(.DIV(TRIG_DIV)) u_trigger (
    .clk     (clk),
    .rst_n   (rst_n),
    .trigger (trigger_out)
  );

  if (TIMING_MODEL) begin : g_timed
    dtc_delay_line_model #(.N_STAGES(N_STAGES)) u_line (
      .pattern (pattern),
      .trigger (trigger_out),
      .dtc_out (dtc_out)
    );
    assign taps = '0;
  end else begin : g_rtl
    dtc_delay_line #(.N_STAGES(N_STAGES)) u_line (
      .pattern (pattern),
      .trigger (trigger_out),
      .taps    (taps),
      .dtc_out (dtc_out)
    );
  end
endmodule
