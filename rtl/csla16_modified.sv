// csla16_modified: 16-bit square-root carry select adder in which each upper
// group's carry-in-1 ripple adder is replaced by a binary to excess-1
// converter (BEC).
//
// The 16 bits are split into five groups of growing width, least significant
// first: 2, 2, 3, 4 and 5 bits (bits 1:0, 3:2, 6:4, 10:7, 15:11).
//   * Group 0 is a 2-bit ripple carry adder fed with the real carry in; its
//     carry out is wmc0.
//   * Each upper group k (1..4) has a (k+1)-bit ripple adder with carry in
//     tied to 0, giving sum wsk and carry wck. The BEC adds one to {wck, wsk}
//     to give wek, the group's result for carry in 1. A multiplexer picks
//     {wck, wsk} or wek by the carry out of the group below, and so yields
//     the group's sum bits and its carry out (wmck; the last group's is the
//     adder's carry).
// All groups work in parallel; only the multiplexer chain waits on carries, so
// the delay is roughly one 5-bit ripple plus a BEC plus a few mux stages,
// while a single BEC costs fewer gates than the second ripple adder it
// replaces. Purely combinational: no clock, no reset, result valid one
// combinational delay after the operands.
//
// Ports: a, b    16-bit operands
//        cin     carry in
//        sum     16-bit sum
//        carry   carry out
//
// The group widths, the instance set (ripple adders of 2, 2, 3, 4 and 5 bits,
// BECs of 3, 4, 5 and 6 bits, 6:3, 8:4, 10:5 and 12:6 multiplexers), the
// grounded carry in of the upper ripple adders and the internal net names
// follow the design. The fixed 16-bit width is the design's main
// configuration; there is no width parameter because the group split is
// given only for 16 bits.
module csla16_modified (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] sum,
  output logic        carry
);
  // Ripple adder (carry-in 0) sums and carries of groups 1..4
  logic [1:0] ws1;
  logic [2:0] ws2;
  logic [3:0] ws3;
  logic [4:0] ws4;
  logic       wc1, wc2, wc3, wc4;
  // Excess-1 (carry-in 1) results of groups 1..4, carry on top
  logic [2:0] we1;
  logic [3:0] we2;
  logic [4:0] we3;
  logic [5:0] we4;
  // Carry out of each group after selection
  logic       wmc0, wmc1, wmc2, wmc3;

  // Group 0: bits 1:0, real carry in
  rca #(.WIDTH(2)) u_rca2bit_g0 (
    .a(a[1:0]), .b(b[1:0]), .cin(cin), .sum(sum[1:0]), .cout(wmc0)
  );

  // Group 1: bits 3:2
  rca #(.WIDTH(2)) u_rca2bit_g1 (
    .a(a[3:2]), .b(b[3:2]), .cin(1'b0), .sum(ws1), .cout(wc1)
  );
  bec #(.WIDTH(3)) u_bec3bit (.b({wc1, ws1}), .x(we1));
  csla_mux #(.WIDTH(3)) u_mux6_3 (
    .d0({wc1, ws1}), .d1(we1), .sel(wmc0), .y({wmc1, sum[3:2]})
  );

  // Group 2: bits 6:4
  rca #(.WIDTH(3)) u_rca3bit (
    .a(a[6:4]), .b(b[6:4]), .cin(1'b0), .sum(ws2), .cout(wc2)
  );
  bec #(.WIDTH(4)) u_bec4bit (.b({wc2, ws2}), .x(we2));
  csla_mux #(.WIDTH(4)) u_mux8_4 (
    .d0({wc2, ws2}), .d1(we2), .sel(wmc1), .y({wmc2, sum[6:4]})
  );

  // Group 3: bits 10:7
  rca #(.WIDTH(4)) u_rca4bit (
    .a(a[10:7]), .b(b[10:7]), .cin(1'b0), .sum(ws3), .cout(wc3)
  );
  bec #(.WIDTH(5)) u_bec5bit (.b({wc3, ws3}), .x(we3));
  csla_mux #(.WIDTH(5)) u_mux10_5 (
    .d0({wc3, ws3}), .d1(we3), .sel(wmc2), .y({wmc3, sum[10:7]})
  );

  // Group 4: bits 15:11
  rca #(.WIDTH(5)) u_rca5bit (
    .a(a[15:11]), .b(b[15:11]), .cin(1'b0), .sum(ws4), .cout(wc4)
  );
  bec #(.WIDTH(6)) u_bec6bit (.b({wc4, ws4}), .x(we4));
  csla_mux #(.WIDTH(6)) u_mux12_6 (
    .d0({wc4, ws4}), .d1(we4), .sel(wmc3), .y({carry, sum[15:11]})
  );
endmodule
