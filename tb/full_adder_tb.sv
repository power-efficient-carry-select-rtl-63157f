// full_adder_tb: exhaustive self-check of the one-bit full adder.
//
// Applies all eight input combinations and compares {cout, s} with the
// integer sum a + b + cin. Ends with a TB_RESULT line; a watchdog ends the
// run with a failure if it stalls.
module full_adder_tb;
  logic a, b, cin, s, cout;
  int   checks = 0;
  int   failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100000;
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
      if ({cout, s} != 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b -> cout=%b s=%b", a, b, cin, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
