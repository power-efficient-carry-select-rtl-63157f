// csla_mux_tb: self-check of the group multiplexer at the four widths the
// 16-bit carry select adder uses (6:3, 8:4, 10:5 and 12:6).
//
// Random pairs of inputs are applied with both select values; the output must
// equal d0 when sel is 0 and d1 when sel is 1. The 6:3 instance keeps the
// module's default width. Ends with a TB_RESULT line; a watchdog ends the run
// with a failure if it stalls.
module csla_mux_tb;
  logic [5:0] d0, d1;
  logic       sel;
  logic [2:0] y3;
  logic [3:0] y4;
  logic [4:0] y5;
  logic [5:0] y6;
  int         checks = 0;
  int         failures = 0;

  csla_mux              u3 (.d0(d0[2:0]), .d1(d1[2:0]), .sel(sel), .y(y3));
  csla_mux #(.WIDTH(4)) u4 (.d0(d0[3:0]), .d1(d1[3:0]), .sel(sel), .y(y4));
  csla_mux #(.WIDTH(5)) u5 (.d0(d0[4:0]), .d1(d1[4:0]), .sel(sel), .y(y5));
  csla_mux #(.WIDTH(6)) u6 (.d0(d0[5:0]), .d1(d1[5:0]), .sel(sel), .y(y6));

  task automatic check(string name, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s d0=%h d1=%h sel=%b got=%h exp=%h", name, d0, d1, sel, got, exp);
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
    logic [5:0] exp;
    for (int n = 0; n < 200; n++) begin
      d0  = 6'($urandom);
      d1  = 6'($urandom);
      if (n == 0) begin d0 = '0; d1 = '1; end
      if (n == 1) begin d0 = '1; d1 = '0; end
      sel = 1'(n);
      #1;
      exp = sel ? d1 : d0;
      check("mux6_3",   int'(y3), int'(exp[2:0]));
      check("mux8_4",   int'(y4), int'(exp[3:0]));
      check("mux10_5",  int'(y5), int'(exp[4:0]));
      check("mux12_6",  int'(y6), int'(exp[5:0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
