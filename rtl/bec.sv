// bec: WIDTH-bit binary to excess-1 converter (add-one circuit).
//
// Produces x = b + 1 (modulo 2**WIDTH) without an adder: bit 0 is inverted,
// and every higher bit i is flipped when all bits below it are 1:
//     x[0] = ~b[0]
//     x[i] =  b[i] ^ (b[0] & b[1] & ... & b[i-1])
// The AND terms are formed as a running chain. In the carry select adder it
// takes the {carry, sum} result of a group's carry-in-0 ripple adder and gives
// the result that group would have had with carry in 1, replacing the second
// ripple adder of a conventional carry select adder. Combinational.
//
// Ports: b   WIDTH-bit input (carry-in-0 result, carry on top)
//        x   WIDTH-bit output, b + 1
//
// The add-one function and its use in place of the carry-in-1 adder follow
// the design, as do the widths 3, 4, 5 and 6 its 16-bit adder needs; WIDTH
// defaults to 3, the smallest of these. The inverter/XOR/AND-chain gate
// structure is the usual one for such a converter.
module bec #(
  parameter int unsigned WIDTH = 3
) (
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] x
);
  logic [WIDTH-1:0] all_ones;  // all_ones[i]: bits 0..i-1 of b are all 1

  assign all_ones[0] = 1'b1;
  for (genvar i = 1; i < WIDTH; i++) begin : g_chain
    assign all_ones[i] = all_ones[i-1] & b[i-1];
  end
  assign x = b ^ all_ones;
endmodule
