// csla16_modified_tb: end-to-end self-check of the 16-bit BEC carry select
// adder at its only (full) size.
//
// Phases:
//   1. The reference vector a=51873, b=5418, cin=0: besides sum=57291 and
//      carry=0, every internal group net (ws1..ws4, we1..we4, wc1..wc4,
//      wmc0..wmc3) is compared with the value expected for it.
//   2. Corner operands (0, all ones, alternating bits, single carries that
//      ripple across every group boundary) with both carry-in values.
//   3. Operands of 8 bits only (upper byte zero), as an 8-bit addition.
//   4. Random 16-bit operands and carry in.
// Every result {carry, sum} is compared with the integer a + b + cin, and the
// carry into each group (bits 2, 4, 7, 11) is compared with the selected
// group carries inside the adder. Expected values are computed from the
// operands alone, never from the adder's outputs.
//
// Mechanisms counted, each of which must occur at least once: each of the
// four multiplexers picking the ripple (carry-in 0) result, each picking the
// excess-1 result, each group's excess-1 converter wrapping into a carry
// (carry-in-0 result all ones while a carry comes in), carry in 1, and a carry out of the adder.
// A watchdog ends the run with a failure if it stalls.
module csla16_modified_tb;
  logic [15:0] a, b, sum;
  logic        cin, carry;
  int          checks = 0;
  int          failures = 0;

  int          sel_rca[4];   // group k+1 multiplexer picked the carry-in-0 result
  int          sel_bec[4];   // group k+1 multiplexer picked the excess-1 result
  int          bec_wrap[4];  // group k+1 excess-1 result carried out of the group
  int          n_cin1 = 0;
  int          n_cout = 0;

  // Bit position where each group starts and its width, least significant first
  localparam int LO[5] = '{0, 2, 4, 7, 11};
  localparam int W[5]  = '{2, 2, 3, 4, 5};

  csla16_modified dut (.a(a), .b(b), .cin(cin), .sum(sum), .carry(carry));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d cin=%0d got=%0d exp=%0d", what, a, b, cin, got, exp);
    end
  endtask

  // Sum of bits lo..lo+w-1 of a and b, with carry in c
  function automatic int slice_sum(logic [15:0] x, logic [15:0] y, int lo, int w, int c);
    int mask = (1 << w) - 1;
    return ((int'(x) >> lo) & mask) + ((int'(y) >> lo) & mask) + c;
  endfunction

  task automatic apply(logic [15:0] av, logic [15:0] bv, logic cv);
    int exp_total;
    int gc[5];  // carry into group k
    a   = av;
    b   = bv;
    cin = cv;
    #1;
    exp_total = int'(av) + int'(bv) + int'(cv);
    check("result", longint'({carry, sum}), longint'(exp_total));

    gc[0] = int'(cv);
    for (int k = 1; k < 5; k++)
      gc[k] = slice_sum(av, bv, 0, LO[k], int'(cv)) >> LO[k];
    check("wmc0", longint'(dut.wmc0), longint'(gc[1]));
    check("wmc1", longint'(dut.wmc1), longint'(gc[2]));
    check("wmc2", longint'(dut.wmc2), longint'(gc[3]));
    check("wmc3", longint'(dut.wmc3), longint'(gc[4]));

    for (int k = 1; k < 5; k++) begin
      int r0 = slice_sum(av, bv, LO[k], W[k], 0);
      if (gc[k] == 1) sel_bec[k-1]++;
      else            sel_rca[k-1]++;
      if (gc[k] == 1 && r0 == (1 << W[k]) - 1) bec_wrap[k-1]++;
    end
    if (cv) n_cin1++;
    if ((exp_total >> 16) != 0) n_cout++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] pat[6];
    pat = '{16'h0000, 16'hFFFF, 16'hAAAA, 16'h5555, 16'h0001, 16'h8000};

    // 1. Reference vector with its internal nets
    apply(16'd51873, 16'd5418, 1'b0);
    check("sum",  longint'(sum), 57291);
    check("ws1",  longint'(dut.ws1), 'b10);
    check("ws2",  longint'(dut.ws2), 'b100);
    check("ws3",  longint'(dut.ws3), 'b1111);
    check("ws4",  longint'(dut.ws4), 'b11011);
    check("we1",  longint'(dut.we1), 'b011);
    check("we2",  longint'(dut.we2), 'b0101);
    check("we3",  longint'(dut.we3), 'b10000);
    check("we4",  longint'(dut.we4), 'b011100);
    check("wc",   longint'({dut.wc1, dut.wc2, dut.wc3, dut.wc4}), 0);

    // 2. Corner operands
    for (int i = 0; i < 6; i++)
      for (int j = 0; j < 6; j++)
        for (int c = 0; c < 2; c++) apply(pat[i], pat[j], 1'(c));
    for (int k = 1; k < 5; k++) begin
      // all ones below group k plus one: carry ripples into group k
      apply(16'((1 << LO[k]) - 1), 16'd0, 1'b1);
      // group k's carry-in-0 result is all ones and a carry comes in
      apply(16'(((1 << W[k]) - 1) << LO[k]), 16'd1, 1'b1);
      apply(16'(((1 << W[k]) - 1) << LO[k]), 16'd0, 1'b1);
    end

    // 3. 8-bit operands
    for (int n = 0; n < 2000; n++)
      apply(16'($urandom_range(255)), 16'($urandom_range(255)), 1'($urandom));

    // 4. Random 16-bit operands
    for (int n = 0; n < 20000; n++)
      apply(16'($urandom), 16'($urandom), 1'($urandom));

    for (int k = 0; k < 4; k++) begin
      $display("group %0d: picked carry-in-0 result %0d times, excess-1 result %0d times, excess-1 carry-out %0d times",
               k + 1, sel_rca[k], sel_bec[k], bec_wrap[k]);
      checks += 3;
      if (sel_rca[k] == 0)  begin failures++; $display("FAIL group %0d never picked the carry-in-0 result", k + 1); end
      if (sel_bec[k] == 0)  begin failures++; $display("FAIL group %0d never picked the excess-1 result", k + 1); end
      if (bec_wrap[k] == 0) begin failures++; $display("FAIL group %0d excess-1 converter never carried out", k + 1); end
    end
    $display("carry in 1: %0d times, carry out: %0d times", n_cin1, n_cout);
    checks += 2;
    if (n_cin1 == 0) begin failures++; $display("FAIL carry in never 1"); end
    if (n_cout == 0) begin failures++; $display("FAIL carry out never 1"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
