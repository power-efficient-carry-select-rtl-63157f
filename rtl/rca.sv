// rca: WIDTH-bit ripple carry adder.
//
// A chain of WIDTH full adders; the carry out of bit i is the carry in of bit
// i+1, so the result settles after WIDTH full-adder delays. In the carry
// select adder one instance adds the least significant group with the real
// carry in, and one instance per upper group adds that group with its carry
// in tied to 0. Combinational, no clock or reset.
//
// Ports: a, b   WIDTH-bit operands
//        cin    carry into bit 0
//        sum    WIDTH-bit sum
//        cout   carry out of the top bit
//
// The design names the 2-, 3-, 4- and 5-bit ripple adders it uses; WIDTH
// defaults to 2, the width of the two smallest of them. Building them from a
// chain of full adders follows the design; everything else is generic.
module rca #(
  parameter int unsigned WIDTH = 2
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;  // c[i] is the carry into bit i

  assign c[0] = cin;
  assign cout = c[WIDTH];

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .s   (sum[i]),
      .cout(c[i+1])
    );
  end
endmodule
