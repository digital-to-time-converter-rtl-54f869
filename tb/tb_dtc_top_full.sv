// Full-size functional testbench of dtc_top with every parameter at its
// default: 128-element synthesizable multiplexer line, 129-bit pattern,
// trigger = 50 MHz clock divided by 10. The line has no delay in this
// simulation, so each train is checked at its two steady states: with the
// trigger low every element shows its own pattern bit and the output the top
// bit; with the trigger high every element and the output carry Init. It also
// checks the 200 ns trigger period and that a pattern written while the
// trigger is low reaches the line one clock later.
module tb_dtc_top_full;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N = 128;

  logic         clk = 1'b0;
  logic         rst_n, pattern_load;
  logic [N:0]   pattern_in, pattern;
  logic         trigger_out, dtc_out;
  logic [N:1]   taps;
  int checks = 0, failures = 0;
  longint last_rise = -1;

  dtc_top dut (
    .clk(clk), .rst_n(rst_n), .pattern_load(pattern_load),
    .pattern_in(pattern_in), .pattern(pattern), .trigger_out(trigger_out),
    .taps(taps), .dtc_out(dtc_out));

  always #10000 clk = ~clk;

  always @(posedge trigger_out) begin
    if (last_rise >= 0) begin
      checks++;
      if ($time - last_rise != 200000) begin
        failures++;
        $display("FAIL trigger period %0d ps", $time - last_rise);
      end
    end
    last_rise = $time;
  end

  initial begin
    #1000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic train(input logic [N:0] p);
    @(negedge trigger_out);
    @(negedge clk);
    pattern_in   = p;
    pattern_load = 1'b1;
    @(negedge clk);
    pattern_load = 1'b0;
    checks++;
    if (taps !== p[N:1] || dtc_out !== p[N] || pattern !== p) begin
      failures++;
      $display("FAIL idle: taps %h output %0b for pattern %h", taps, dtc_out, p);
    end
    @(posedge trigger_out);
    #1000;
    checks++;
    if (taps !== {N{p[0]}} || dtc_out !== p[0]) begin
      failures++;
      $display("FAIL triggered: taps %h output %0b, Init %0b", taps, dtc_out, p[0]);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    pattern_load = 1'b0;
    pattern_in = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (pattern !== '0 || dtc_out !== 1'b0) begin
      failures++;
      $display("FAIL reset state");
    end
    rst_n = 1'b1;
    train({1'b0, 128'hE1830100_80100100_04000400_00800002});
    train({1'b0, 4'hF, 112'h0, 12'hFFE});
    train({1'b1, 127'h0, 1'b1});
    for (int r = 0; r < 20; r++)
      train((N+1)'({$urandom, $urandom, $urandom, $urandom, $urandom}));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
