// Testbench of dtc_pattern_register at its full 129-bit width: checks the
// reset value, that a pattern is taken one clock after load, that it is held
// while load is low whatever pattern_in does, and that reset clears it.
module tb_dtc_pattern_register;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned W = 129;

  logic         clk = 1'b0;
  logic         rst_n, load;
  logic [W-1:0] pattern_in, pattern, expected;
  int checks = 0, failures = 0;

  dtc_pattern_register #(.PATTERN_BITS(W)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .pattern_in(pattern_in),
    .pattern(pattern));

  always #10000 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if (pattern !== expected) begin
      failures++;
      $display("FAIL %s: pattern %h expected %h", what, pattern, expected);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    load = 1'b0;
    pattern_in = '1;
    @(posedge clk); @(posedge clk); #1;
    expected = '0;
    check("reset");
    rst_n = 1'b1;
    for (int r = 0; r < 200; r++) begin
      load = 1'($urandom);
      pattern_in = W'({$urandom, $urandom, $urandom, $urandom, $urandom});
      @(posedge clk); #1;
      if (load) expected = pattern_in;
      check(load ? "load" : "hold");
    end
    rst_n = 1'b0;
    load = 1'b1;
    @(posedge clk); #1;
    expected = '0;
    check("reset over load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
