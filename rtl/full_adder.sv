// full_adder: one-bit full adder, the cell the ripple carry adders of the
// carry select adder are chained from.
//
// Sum is the XOR of the three inputs; carry out is their majority. The cell is
// purely combinational: outputs follow the inputs after the gate delay, with
// no clock and no reset.
//
// Ports: a, b   operand bits
//        cin    carry in
//        s      sum bit
//        cout   carry out
//
// The adder is built from full adders as in the source design; the gate
// equations are the textbook ones, since the design does not spell them out.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic p;  // propagate

  always_comb begin
    p    = a ^ b;
    s    = p ^ cin;
    cout = (a & b) | (p & cin);
  end
endmodule
