// Testbench of dtc_lut_mux: applies all eight input combinations and checks
// that the output is A with the selector low and B with it high.
module tb_dtc_lut_mux;
  timeunit 1ps;
  timeprecision 1ps;

  logic a, b, s, o;
  int checks = 0, failures = 0;

  dtc_lut_mux dut (.a(a), .b(b), .s(s), .o(o));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      {s, b, a} = 3'(k);
      #10;
      checks++;
      if (o !== (k[2] ? k[1] : k[0])) begin
        failures++;
        $display("FAIL s=%0b b=%0b a=%0b o=%0b", s, b, a, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
