// Testbench of dtc_delay_line at its full 128-element size. For random and
// hand-picked patterns it checks that with the trigger low every element
// output equals its own pattern bit (the output is the top bit), and that
// with the trigger high every element, and so the output, has settled to
// the Init bit (the line has no delay in a functional simulation).
module tb_dtc_delay_line;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N = 128;

  logic [N:0] pattern;
  logic       trigger;
  logic [N:1] taps;
  logic       dtc_out;
  int checks = 0, failures = 0;

  dtc_delay_line #(.N_STAGES(N)) dut (
    .pattern(pattern), .trigger(trigger), .taps(taps), .dtc_out(dtc_out));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_pattern(input logic [N:0] p);
    pattern = p;
    trigger = 1'b0;
    #100;
    for (int i = 1; i <= N; i++) begin
      checks++;
      if (taps[i] !== p[i]) begin
        failures++;
        $display("FAIL idle tap %0d = %0b, pattern bit %0b", i, taps[i], p[i]);
      end
    end
    checks++;
    if (dtc_out !== p[N]) begin
      failures++;
      $display("FAIL idle output %0b, expected %0b", dtc_out, p[N]);
    end
    trigger = 1'b1;
    #100;
    for (int i = 1; i <= N; i++) begin
      checks++;
      if (taps[i] !== p[0]) begin
        failures++;
        $display("FAIL triggered tap %0d = %0b, Init %0b", i, taps[i], p[0]);
      end
    end
    checks++;
    if (dtc_out !== p[0]) begin
      failures++;
      $display("FAIL triggered output %0b, expected Init %0b", dtc_out, p[0]);
    end
  endtask

  initial begin
    logic [N:0] p;
    check_pattern('0);
    check_pattern('1);
    check_pattern({1'b0, 128'hE1830100_80100100_04000400_00800002});
    check_pattern({1'b1, 127'h0, 1'b1});
    for (int r = 0; r < 50; r++) begin
      p = (N+1)'({$urandom, $urandom, $urandom, $urandom, $urandom});
      check_pattern(p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
