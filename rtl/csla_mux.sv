// csla_mux: 2*WIDTH:WIDTH multiplexer of a carry select group.
//
// Chooses between the group's two precomputed results, each WIDTH bits with
// the group's carry out on top: d0, the ripple adder result with carry in 0,
// and d1, the excess-1 converter output (the result with carry in 1). sel is
// the carry out of the group below: 0 picks d0, 1 picks d1. Combinational; the
// selection costs one multiplexer delay once sel arrives.
//
// Ports: d0    WIDTH-bit result for carry in 0
//        d1    WIDTH-bit result for carry in 1
//        sel   carry from the group below
//        y     selected WIDTH-bit result
//
// The 6:3, 8:4, 10:5 and 12:6 multiplexers and their select by the incoming
// carry follow the design; WIDTH defaults to 3, the 6:3 one.
module csla_mux #(
  parameter int unsigned WIDTH = 3
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);
  always_comb y = sel ? d1 : d0;
endmodule
