// Testbench of the timed delay-line model at the full 128-element size.
//
// Two instances share pattern and trigger: one with the default unequal
// rise/fall delays (253 ps / 294 ps) and one with equal delays of 253 ps.
// For every pattern the output edges after a rising trigger are recorded and
// compared, edge by edge, with dtc_tb_pkg::expect_train() (stage-by-stage
// reference) and, for the equal-delay instance, with the plain rule "the
// boundary between bits N-k and N-k+1 arrives after k delays". Patterns:
// the 126-step absolute-delay sweep (bits 1..m set), the 11-pulse train
// 0x0_E1830100_80100100_04000400_00800002, the pulse-pair sweep from
// 0x0_F000..0002 to 0x0_F07F..FFFE, an Init = 1 pattern and a one-bit gap
// that shrinks away. It also checks the idle output, the return to idle one
// element delay after the trigger falls, and a train cut short by the
// trigger.
module tb_dtc_delay_line_model;
  timeunit 1ps;
  timeprecision 1ps;
  import dtc_tb_pkg::*;

  localparam int unsigned N    = 128;
  localparam longint      TPLH = 253;
  localparam longint      TPHL = 294;

  logic [N:0] pattern;
  logic       trigger;
  logic       out_a, out_s;
  int checks = 0, failures = 0;
  int n_vanished = 0, n_cut = 0;

  dtc_delay_line_model dut (.pattern(pattern), .trigger(trigger), .dtc_out(out_a));
  dtc_delay_line_model #(.N_STAGES(N), .TPLH_PS(253), .TPHL_PS(253)) dut_sym (
    .pattern(pattern), .trigger(trigger), .dtc_out(out_s));

  longint t0;
  edge_t  got_a[$], got_s[$];

  always @(out_a) if (trigger) got_a.push_back('{t: $time - t0, v: out_a});
  always @(out_s) if (trigger) got_s.push_back('{t: $time - t0, v: out_s});

  initial begin
    #1000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void compare(input string what, ref edge_t got[$], ref edge_t exp[$]);
    checks++;
    if (got.size() != exp.size()) begin
      failures++;
      $display("FAIL %s: %0d edges, expected %0d", what, got.size(), exp.size());
      return;
    end
    foreach (exp[i]) begin
      checks++;
      if (got[i].t != exp[i].t || got[i].v != exp[i].v) begin
        failures++;
        $display("FAIL %s edge %0d: %0d ps ->%0b, expected %0d ps ->%0b",
                 what, i, got[i].t, got[i].v, exp[i].t, exp[i].v);
      end
    end
  endfunction

  // Runs one train; returns the edges seen on the unequal-delay instance.
  task automatic run(input logic [N:0] p, input string what, ref edge_t seen[$]);
    edge_t exp_a[$], exp_s[$];
    logic [MAXN:0] pw;
    pattern = p;
    #50000;
    checks++;
    if (out_a !== p[N] || out_s !== p[N]) begin
      failures++;
      $display("FAIL %s: idle output %0b/%0b, expected %0b", what, out_a, out_s, p[N]);
    end
    got_a = {};
    got_s = {};
    t0 = $time;
    trigger = 1'b1;
    #60000;
    pw = '0;
    pw[N:0] = p;
    expect_train(pw, N, TPLH, TPHL, exp_a);
    compare({what, " (unequal delays)"}, got_a, exp_a);
    exp_s = {};
    for (int k = 1; k <= N; k++)
      if (p[N-k] != p[N-k+1]) exp_s.push_back('{t: k * 253, v: p[N-k]});
    compare({what, " (equal delays)"}, got_s, exp_s);
    checks++;
    if (out_a !== p[0]) begin
      failures++;
      $display("FAIL %s: final level %0b, Init %0b", what, out_a, p[0]);
    end
    if (exp_a.size() < exp_s.size()) n_vanished++;
    seen = got_a;
    trigger = 1'b0;
    // back to idle one element delay after the trigger falls
    #(p[N] ? TPLH - 1 : TPHL - 1);
    checks++;
    if (p[N] != p[0] && out_a !== p[0]) begin
      failures++;
      $display("FAIL %s: returned to idle too early", what);
    end
    #2;
    checks++;
    if (out_a !== p[N]) begin
      failures++;
      $display("FAIL %s: not idle after trigger fall", what);
    end
  endtask

  initial begin
    logic [N:0] p;
    edge_t seen[$];
    longint first_w = -1;
    trigger = 1'b0;
    pattern = '0;
    #10000;

    // absolute delay: bits 1..m high, 126 steps of one rising-edge delay
    for (int m = 1; m <= N - 2; m++) begin
      p = '0;
      for (int b = 1; b <= m; b++) p[b] = 1'b1;
      run(p, $sformatf("delay step %0d", m), seen);
      checks++;
      if (seen.size() != 2 || seen[0].t != (N - m) * TPLH) begin
        failures++;
        $display("FAIL step %0d: rising edge not at %0d ps", m, (N - m) * TPLH);
      end
    end

    // single pulse from bit 1: about 0.3 ns wide at the start, ~5.5 ns here
    p = '0; p[1] = 1'b1;
    run(p, "single pulse", seen);
    checks++;
    if (seen.size() != 2 || seen[1].t - seen[0].t != N * TPHL - (N - 1) * TPLH) begin
      failures++;
      $display("FAIL single pulse width");
    end

    // the 11-pulse train
    run({1'b0, 128'hE1830100_80100100_04000400_00800002}, "11-pulse train", seen);
    checks++;
    if (seen.size() != 22) begin
      failures++;
      $display("FAIL 11-pulse train: %0d edges", seen.size());
    end

    // pulse pairs: bits 124..127 form the first pulse, bits 1..m the second
    for (int m = 1; m <= 118; m++) begin
      p = '0;
      for (int b = 124; b <= 127; b++) p[b] = 1'b1;
      for (int b = 1; b <= m; b++) p[b] = 1'b1;
      run(p, $sformatf("pulse pair %0d", m), seen);
      checks++;
      if (seen.size() != 4 || seen[2].t - seen[0].t != (N - m - 1) * TPLH) begin
        failures++;
        $display("FAIL pulse pair %0d: interval", m);
      end else begin
        checks++;
        if (first_w >= 0 && seen[1].t - seen[0].t != first_w) begin
          failures++;
          $display("FAIL pulse pair %0d: first pulse width changed", m);
        end
        first_w = seen[1].t - seen[0].t;
      end
    end

    // Init = 1: the output ends high
    p = '0; p[0] = 1'b1; p[100] = 1'b1;
    run(p, "init high", seen);

    // a one-bit low gap near the input shrinks away: one merged pulse
    p = '0; p[1] = 1'b1; p[3] = 1'b1;
    run(p, "vanishing gap", seen);
    checks++;
    if (seen.size() != 2) begin
      failures++;
      $display("FAIL vanishing gap: %0d edges", seen.size());
    end

    // trigger falls in the middle of a train: no further edges
    pattern = {1'b0, 128'hE1830100_80100100_04000400_00800002};
    #50000;
    got_a = {};
    t0 = $time;
    trigger = 1'b1;
    #10000;
    trigger = 1'b0;
    #40000;
    n_cut++;
    checks++;
    if (out_a !== 1'b0 || got_a.size() == 0) begin
      failures++;
      $display("FAIL cut train");
    end
    foreach (got_a[i]) begin
      checks++;
      if (got_a[i].t > 10000) begin
        failures++;
        $display("FAIL cut train: edge at %0d ps after trigger fall", got_a[i].t);
      end
    end

    checks++;
    if (n_vanished == 0) begin
      failures++;
      $display("FAIL no pulse vanished");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
