// End-to-end testbench of dtc_top with the timed delay-line model
// (TIMING_MODEL = 1, every size at its default: 128 elements, trigger = clock
// divided by 10 on a 50 MHz clock).
//
// A host process writes a new pattern after every falling trigger edge; the
// following rising edge starts a train whose output edges are recorded and
// compared with dtc_tb_pkg::expect_train(). The patterns are the 126-step
// absolute-delay sweep, the 11-pulse train, the pulse-pair sweep, an Init = 1
// pattern and a pattern whose one-bit gap shrinks away. Checked as well: the
// 200 ns trigger period, the idle level before each train, the final level
// (Init) and the 38 ns range of the longest train. Every mechanism of the
// converter is counted (pattern load, train start, return to idle,
// stretched pulse (over 1 ns wider than its bits), vanished pulse, Init = 1 end level, 11-pulse train) and a
// mechanism that never occurred counts as a failure.
module tb_dtc_top;
  timeunit 1ps;
  timeprecision 1ps;
  import dtc_tb_pkg::*;

  localparam int unsigned N    = 128;
  localparam longint      TPLH = 253;
  localparam longint      TPHL = 294;

  logic         clk = 1'b0;
  logic         rst_n, pattern_load;
  logic [N:0]   pattern_in, pattern;
  logic         trigger_out, dtc_out;
  logic [N:1]   taps;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_load = 0, n_start = 0, n_idle = 0, n_stretch = 0, n_vanish = 0;
  int n_init_high = 0, n_eleven = 0;

  dtc_top #(.TIMING_MODEL(1'b1)) dut (
    .clk(clk), .rst_n(rst_n), .pattern_load(pattern_load),
    .pattern_in(pattern_in), .pattern(pattern), .trigger_out(trigger_out),
    .taps(taps), .dtc_out(dtc_out));

  always #10000 clk = ~clk;

  longint t0 = 0;
  longint last_rise = -1;
  edge_t  got[$];

  always @(dtc_out) if (trigger_out) got.push_back('{t: $time - t0, v: dtc_out});

  always @(posedge trigger_out) begin
    if (last_rise >= 0) begin
      checks++;
      if ($time - last_rise != 200000) begin
        failures++;
        $display("FAIL trigger period %0d ps", $time - last_rise);
      end
    end
    last_rise = $time;
    t0 = $time;
  end

  initial begin
    #2000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Loads p while the trigger is low, runs one train and checks it.
  task automatic train(input logic [N:0] p, input string what, ref edge_t seen[$]);
    edge_t exp_e[$];
    logic [MAXN:0] pw;
    @(negedge trigger_out);
    @(negedge clk);
    pattern_in   = p;
    pattern_load = 1'b1;
    @(negedge clk);
    pattern_load = 1'b0;
    checks++;
    if (pattern !== p) begin
      failures++;
      $display("FAIL %s: pattern register %h", what, pattern);
    end else n_load++;
    @(posedge trigger_out);
    checks++;
    if (dtc_out !== p[N]) begin
      failures++;
      $display("FAIL %s: idle level %0b before train", what, dtc_out);
    end
    got = {};
    n_start++;
    @(negedge trigger_out);
    pw = '0;
    pw[N:0] = p;
    expect_train(pw, N, TPLH, TPHL, exp_e);
    checks++;
    if (got.size() != exp_e.size()) begin
      failures++;
      $display("FAIL %s: %0d edges, expected %0d", what, got.size(), exp_e.size());
    end else begin
      foreach (exp_e[i]) begin
        checks++;
        if (got[i].t != exp_e[i].t || got[i].v != exp_e[i].v) begin
          failures++;
          $display("FAIL %s edge %0d: %0d ps ->%0b, expected %0d ps ->%0b",
                   what, i, got[i].t, got[i].v, exp_e[i].t, exp_e[i].v);
        end
      end
    end
    checks++;
    if (dtc_out !== p[0]) begin
      failures++;
      $display("FAIL %s: final level %0b, Init %0b", what, dtc_out, p[0]);
    end else if (p[0]) n_init_high++;
    seen = got;
    #(TPLH + TPHL);
    checks++;
    if (dtc_out !== p[N]) begin
      failures++;
      $display("FAIL %s: not back to idle level", what);
    end else n_idle++;
  endtask

  initial begin
    logic [N:0] p;
    edge_t seen[$];
    rst_n = 1'b0;
    pattern_load = 1'b0;
    pattern_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int m = 1; m <= N - 2; m++) begin
      p = '0;
      for (int b = 1; b <= m; b++) p[b] = 1'b1;
      train(p, $sformatf("delay step %0d", m), seen);
      checks++;
      if (seen.size() != 2 || seen[0].t != (N - m) * TPLH) begin
        failures++;
        $display("FAIL step %0d: delay", m);
      end else if (seen[1].t - seen[0].t > m * TPLH + 1000) begin
        // m high bits should give a pulse about m delays wide; it left the
        // line over a nanosecond wider
        n_stretch++;
      end
    end

    train({1'b0, 128'hE1830100_80100100_04000400_00800002}, "11-pulse train", seen);
    checks++;
    if (seen.size() == 22 && seen[21].t < 38000 && seen[21].t > 37000) n_eleven++;
    else begin
      failures++;
      $display("FAIL 11-pulse train: %0d edges", seen.size());
    end

    for (int m = 1; m <= 118; m += 9) begin
      p = '0;
      for (int b = 124; b <= 127; b++) p[b] = 1'b1;
      for (int b = 1; b <= m; b++) p[b] = 1'b1;
      train(p, $sformatf("pulse pair %0d", m), seen);
      checks++;
      if (seen.size() != 4 || seen[2].t - seen[0].t != (N - m - 1) * TPLH) begin
        failures++;
        $display("FAIL pulse pair %0d", m);
      end
    end

    p = '0; p[0] = 1'b1; p[64] = 1'b1;
    train(p, "init high", seen);

    p = '0; p[1] = 1'b1; p[3] = 1'b1;
    train(p, "vanishing gap", seen);
    checks++;
    if (seen.size() == 2) n_vanish++;
    else begin
      failures++;
      $display("FAIL vanishing gap: %0d edges", seen.size());
    end

    $display("mechanisms: load=%0d start=%0d idle=%0d stretch=%0d vanish=%0d init_high=%0d eleven=%0d",
             n_load, n_start, n_idle, n_stretch, n_vanish, n_init_high, n_eleven);
    checks++; if (n_load == 0)      begin failures++; $display("FAIL no pattern load"); end
    checks++; if (n_start == 0)     begin failures++; $display("FAIL no train"); end
    checks++; if (n_idle == 0)      begin failures++; $display("FAIL no return to idle"); end
    checks++; if (n_stretch == 0)   begin failures++; $display("FAIL no stretched pulse"); end
    checks++; if (n_vanish == 0)    begin failures++; $display("FAIL no vanished pulse"); end
    checks++; if (n_init_high == 0) begin failures++; $display("FAIL no Init = 1 train"); end
    checks++; if (n_eleven == 0)    begin failures++; $display("FAIL no 11-pulse train"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
