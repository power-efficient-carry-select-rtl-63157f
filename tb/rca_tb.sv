// rca_tb: exhaustive self-check of the ripple carry adder at the four widths
// the 16-bit carry select adder uses (2, 3, 4 and 5 bits).
//
// For every width, every operand pair and both carry-in values are applied and
// {cout, sum} is compared with the integer a + b + cin. The 2-bit instance
// keeps the module's default width. Ends with a TB_RESULT line; a watchdog
// ends the run with a failure if it stalls.
module rca_tb;
  logic [4:0] a, b;
  logic       cin;
  logic [1:0] s2;
  logic [2:0] s3;
  logic [3:0] s4;
  logic [4:0] s5;
  logic       c2, c3, c4, c5;
  int         checks = 0;
  int         failures = 0;

  rca             u2 (.a(a[1:0]), .b(b[1:0]), .cin(cin), .sum(s2), .cout(c2));
  rca #(.WIDTH(3)) u3 (.a(a[2:0]), .b(b[2:0]), .cin(cin), .sum(s3), .cout(c3));
  rca #(.WIDTH(4)) u4 (.a(a[3:0]), .b(b[3:0]), .cin(cin), .sum(s4), .cout(c4));
  rca #(.WIDTH(5)) u5 (.a(a[4:0]), .b(b[4:0]), .cin(cin), .sum(s5), .cout(c5));

  task automatic check(int width, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL width=%0d a=%0d b=%0d cin=%0d got=%0d exp=%0d",
               width, a, b, cin, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 2; w <= 5; w++) begin
      for (int i = 0; i < (1 << w); i++)
        for (int j = 0; j < (1 << w); j++)
          for (int c = 0; c < 2; c++) begin
            a   = 5'(i);
            b   = 5'(j);
            cin = 1'(c);
            #1;
            case (w)
              2: check(w, int'({c2, s2}), i + j + c);
              3: check(w, int'({c3, s3}), i + j + c);
              4: check(w, int'({c4, s4}), i + j + c);
              default: check(w, int'({c5, s5}), i + j + c);
            endcase
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
