// tb_fadder9: exhaustive self-check of the fadder9 full adder.
//
// Applies all eight input combinations and compares {cout, sum} with the
// arithmetic sum a + b + cin. A watchdog ends the run if it stalls.
module tb_fadder9;
  logic a, b, cin, s, cout;
  int checks = 0;
  int failures = 0;

  fadder9 dut (.a(a), .b(b), .cin(cin), .sum(s), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if ({cout, s} !== 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b -> cout=%0b s=%0b", a, b, cin, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
