// Timed behavioural model of the DTC delay line (not synthesizable).
//
// This stands for the placed and routed chain of LUT multiplexers, whose
// whole purpose is its propagation delay, something no synthesizable RTL can
// express. Ports and function are those of dtc_delay_line: pattern[0] is
// Init, pattern[i] is the A input of element i, the trigger drives every
// selector. Each element delays a rising level by TPLH_PS and a falling one
// by TPHL_PS.
//
// How it works. When the trigger rises, the level boundary between pattern
// bits i-1 and i is at the output of element i; it travels
// k = N_STAGES-i+1 elements and reaches the line output k element delays
// after the trigger, rising if bit i-1 is 1. The model lists these edges in
// arrival order. Because rising and falling edges travel at different speeds,
// pulses of one level are stretched and pulses of the other shrink by
// |TPHL_PS-TPLH_PS| per element; an edge that would arrive no later than the
// edge before it means the pulse between them has shrunk away, and both are
// dropped. The remaining edges are played out at their times while the
// trigger stays high; the output ends at Init. When the trigger falls every
// element selects A again and, one element delay later, the output shows
// pattern bit N_STAGES, which it then follows while idle.
//
// The equal delay of every element, the equal delay of the selector and data
// paths, and the values of TPLH_PS/TPHL_PS are this model's assumptions,
// fitted to the measured 253 ps mean step and the stretching of a single
// pulse from about 0.3 ns to 5.5 ns over 126 to 127 elements.
module dtc_delay_line_model #(
  parameter int unsigned N_STAGES = dtc_pkg::N_STAGES,
  parameter int unsigned TPLH_PS  = dtc_pkg::TPLH_PS,
  parameter int unsigned TPHL_PS  = dtc_pkg::TPHL_PS
) (
  input  logic [N_STAGES:0] pattern, // [0] = Init, [i] = A input of element i
  input  logic              trigger, // selector of every element
  output logic              dtc_out  // output of the last element
);
  timeunit 1ps;
  timeprecision 1ps;

  longint unsigned edge_t [N_STAGES]; // arrival time after the trigger edge
  logic            edge_v [N_STAGES]; // level after the edge
  int unsigned     n_edges;

  longint unsigned t_rise;     // time of the last rising trigger edge
  longint unsigned t_fall;     // time of the last falling trigger edge
  longint unsigned t_last;     // time pattern[N_STAGES] last changed
  int unsigned     trig_events; // counts trigger edges
  int unsigned     pat_events;  // counts changes of pattern[N_STAGES]

  // The playback process below waits on the event counters, so it always
  // sees the edge times already updated.
  always @(trigger) begin
    if (trigger) t_rise = $time;
    else         t_fall = $time;
    trig_events++;
  end

  always @(pattern[N_STAGES]) begin
    t_last = $time;
    pat_events++;
  end

  function automatic longint unsigned elem_delay(input logic level);
    return level ? longint'(TPLH_PS) : longint'(TPHL_PS);
  endfunction

  // Edge list of the pulse train held by pattern p.
  function automatic void build_train(input logic [N_STAGES:0] p);
    longint unsigned t;
    n_edges = 0;
    for (int unsigned k = 1; k <= N_STAGES; k++) begin
      if (p[N_STAGES-k] != p[N_STAGES-k+1]) begin
        t = longint'(k) * elem_delay(p[N_STAGES-k]);
        if (n_edges > 0 && t <= edge_t[n_edges-1]) begin
          n_edges--;                 // the pulse in between has vanished
        end else begin
          edge_t[n_edges] = t;
          edge_v[n_edges] = p[N_STAGES-k];
          n_edges++;
        end
      end
    end
  endfunction

  initial begin
    longint unsigned target;
    int unsigned     seen_trig, seen_pat;
    t_rise      = 0;
    t_fall      = 0;
    t_last      = 0;
    trig_events = 0;
    pat_events  = 0;
    n_edges     = 0;
    dtc_out     = 1'b0;
    #0;
    dtc_out = pattern[N_STAGES];
    forever begin
      seen_trig = trig_events;
      seen_pat  = pat_events;
      if (trigger) begin
        // one pulse train, cut short if the trigger falls
        build_train(pattern);
        for (int unsigned e = 0; e < n_edges; e++) begin
          target = t_rise + edge_t[e];
          if (target > $time) #(target - $time);
          if (trig_events != seen_trig) break;
          dtc_out = edge_v[e];
        end
        wait (trig_events != seen_trig);
      end else if (dtc_out != pattern[N_STAGES]) begin
        // idle: the last element passes its pattern bit
        target = ((t_fall > t_last) ? t_fall : t_last)
                 + elem_delay(pattern[N_STAGES]);
        if (target > $time) #(target - $time);
        if (trig_events == seen_trig) dtc_out = pattern[N_STAGES];
      end else begin
        wait (trig_events != seen_trig || pat_events != seen_pat);
      end
    end
  end
endmodule
