// Testbench of dtc_trigger_divider with its default ratio of 10: on a 50 MHz
// clock the trigger must be low straight after reset and then repeat five
// clock periods high, five low, giving the 5 MHz trigger (200 ns period).
// It checks the level in every cycle against a separately kept count and the
// period measured between rising edges.
module tb_dtc_trigger_divider;
  timeunit 1ps;
  timeprecision 1ps;

  logic clk = 1'b0;
  logic rst_n, trigger;
  int checks = 0, failures = 0;
  int rises = 0;
  longint last_rise = -1;

  dtc_trigger_divider dut (.clk(clk), .rst_n(rst_n), .trigger(trigger));

  always #10000 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge trigger) if (rst_n) begin
    if (last_rise >= 0) begin
      checks++;
      if ($time - last_rise != 200000) begin
        failures++;
        $display("FAIL trigger period %0d ps", $time - last_rise);
      end
    end
    last_rise = $time;
    rises++;
  end

  initial begin
    int phase;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (trigger !== 1'b0) begin failures++; $display("FAIL trigger high in reset"); end
    rst_n = 1'b1;
    phase = 0;
    for (int c = 0; c < 100; c++) begin
      @(posedge clk); #1;
      checks++;
      if (trigger !== (phase < 5)) begin
        failures++;
        $display("FAIL cycle %0d trigger %0b", c, trigger);
      end
      phase = (phase + 1) % 10;
    end
    checks++;
    if (rises != 10) begin failures++; $display("FAIL %0d trigger edges", rises); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
