// bec_tb: exhaustive self-check of the binary to excess-1 converter at the
// four widths the 16-bit carry select adder uses (3, 4, 5 and 6 bits).
//
// Every input value is applied and the output is compared with (in + 1)
// modulo 2**WIDTH, including the all-ones input that wraps to zero. The
// 3-bit instance keeps the module's default width. Ends with a TB_RESULT
// line; a watchdog ends the run with a failure if it stalls.
module bec_tb;
  logic [5:0] in;
  logic [2:0] x3;
  logic [3:0] x4;
  logic [4:0] x5;
  logic [5:0] x6;
  int         checks = 0;
  int         failures = 0;

  bec              u3 (.b(in[2:0]), .x(x3));
  bec #(.WIDTH(4)) u4 (.b(in[3:0]), .x(x4));
  bec #(.WIDTH(5)) u5 (.b(in[4:0]), .x(x5));
  bec #(.WIDTH(6)) u6 (.b(in[5:0]), .x(x6));

  task automatic check(int width, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL width=%0d in=%0d got=%0d exp=%0d", width, in, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 3; w <= 6; w++)
      for (int v = 0; v < (1 << w); v++) begin
        in = 6'(v);
        #1;
        case (w)
          3: check(w, int'(x3), (v + 1) % (1 << w));
          4: check(w, int'(x4), (v + 1) % (1 << w));
          5: check(w, int'(x5), (v + 1) % (1 << w));
          default: check(w, int'(x6), (v + 1) % (1 << w));
        endcase
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
