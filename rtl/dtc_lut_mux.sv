// One delay element of the DTC: a LUT configured as a two-input multiplexer.
//
// O follows A while the selector S is low (idle: the pattern bit is shown at
// the output) and follows B while S is high (the element becomes one link of
// the delay line, passing on what the previous element outputs). The
// element's delay is a property of the placed LUT and its routing and is not
// expressed here: in an FPGA the cell is placed by hand, one LUT per element,
// with the trigger on a low-skew global net. Purely combinational.
module dtc_lut_mux (
  input  logic a,  // pattern bit
  input  logic b,  // output of the previous element (Init for the first)
  input  logic s,  // trigger
  output logic o   // element output
);
  timeunit 1ps;
  timeprecision 1ps;

  always_comb o = s ? b : a;
endmodule
