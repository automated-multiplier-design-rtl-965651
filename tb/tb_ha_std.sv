// tb_ha_std: exhaustive self-check of the ha_std half adder.
//
// Applies all four input combinations and compares {cout, sum} with a + b.
module tb_ha_std;
  logic a, b, s, cout;
  int checks = 0;
  int failures = 0;

  ha_std dut (.a(a), .b(b), .s(s), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({cout, s} !== 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%0b b=%0b -> cout=%0b s=%0b", a, b, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
