// Multiplexer delay line of the DTC, synthesizable structure.
//
// N_STAGES dtc_lut_mux elements are chained: element i (1..N_STAGES) takes
// pattern bit i on A and the output of element i-1 on B; element 1 takes the
// Init bit (pattern bit 0) on B. All selectors share the trigger. While the
// trigger is low every element shows its own pattern bit, so the line output
// is pattern bit N_STAGES. When the trigger rises every element switches to
// B at the same moment and the levels stored in the chain move one element
// per element delay towards the output: the output then shows bits
// N_STAGES-1, N_STAGES-2, ..., 1 and finally stays at Init. In a
// zero-delay simulation this collapses to "output = Init"; the timed
// behaviour is given by dtc_delay_line_model. Combinational, no clock.
// Structure and sizes follow the published design; the tap vector is this
// implementation's naming.
module dtc_delay_line #(
  parameter int unsigned N_STAGES = dtc_pkg::N_STAGES
) (
  input  logic [N_STAGES:0]   pattern, // [0] = Init, [i] = A input of element i
  input  logic                trigger, // selector of every element
  output logic [N_STAGES:1]   taps,    // output of every element
  output logic                dtc_out  // output of the last element
);
  timeunit 1ps;
  timeprecision 1ps;

  logic link [N_STAGES+1];

  assign link[0] = pattern[0];

  for (genvar i = 1; i <= N_STAGES; i++) begin : g_stage
    dtc_lut_mux u_mux (
      .a (pattern[i]),
      .b (link[i-1]),
      .s (trigger),
      .o (link[i])
    );
    assign taps[i] = link[i];
  end

  assign dtc_out = link[N_STAGES];
endmodule
