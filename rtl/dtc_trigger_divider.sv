// Trigger generator of the DTC: divides the system clock by DIV.
//
// A counter runs 0..DIV-1 on clk; the trigger (a flip-flop) is high while
// the counter holds one of the first DIV/2 counts and low for the rest, so
// with the default DIV = 10 a 50 MHz clock gives a 5 MHz trigger, high for
// 100 ns and low for 100 ns. Each rising
// trigger edge starts one pulse train, each falling edge returns the delay
// line to idle. The trigger leaves a flip-flop so that it is glitch-free;
// on an FPGA it is put on a global clock net to reach all delay elements
// with low skew. The ratio follows the published test set-up; the duty cycle
// and the synchronous active-low reset (trigger low, count DIV-1, so that the
// first full high phase starts on the first clock edge after reset) are this
// implementation's choice.
module dtc_trigger_divider #(
  parameter int unsigned DIV = dtc_pkg::TRIG_DIV
) (
  input  logic clk,
  input  logic rst_n,
  output logic trigger
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned CW = (DIV > 2) ? $clog2(DIV) : 1;

  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count   <= CW'(DIV - 1);
      trigger <= 1'b0;
    end else begin
      count   <= (count == CW'(DIV - 1)) ? '0 : count + 1'b1;
      // trigger is high while the next count is in the first half
      trigger <= ((count == CW'(DIV - 1)) ? '0 : count + 1'b1) < CW'(DIV / 2);
    end
  end

  initial assert (DIV >= 2) else $error("DIV must be at least 2");
endmodule
