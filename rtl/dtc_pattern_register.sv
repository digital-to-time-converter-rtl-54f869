// Pattern register of the DTC.
//
// PATTERN_BITS D flip-flops on the clock clk hold the shape of the pulse
// train: bit 0 is Init, bit i drives the A input of delay element i. A new
// pattern is taken from pattern_in on a rising clk edge while load is high
// and is visible on pattern one cycle later. A synchronous active-low reset
// clears the register, which parks the converter output low. The flip-flops
// and their clock follow the published design; the load enable and the reset
// are this implementation's choice, the host interface that writes the
// pattern not being described.
module dtc_pattern_register #(
  parameter int unsigned PATTERN_BITS = dtc_pkg::PATTERN_BITS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic [PATTERN_BITS-1:0] pattern_in,
  output logic [PATTERN_BITS-1:0] pattern
);
  timeunit 1ps;
  timeprecision 1ps;

  always_ff @(posedge clk) begin
    if (!rst_n)    pattern <= '0;
    else if (load) pattern <= pattern_in;
  end
endmodule
