// vemicry_csa -- carry select adder of one vector processing unit.
//
// Adds a and b twice, once for an incoming carry of 0 and once for 1, so that the
// sum of a vector element can be computed before the carry of the neighbouring
// (less significant) element is known; the lane's EXC stage then only selects.
// Purely combinational. The paper asks for a 32-bit carry select adder in each
// VPU for the partially independent instructions; building it as two full-width
// adders is this design's choice.
module vemicry_csa #(
  parameter int W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s0,   // a + b
  output logic         c0,
  output logic [W-1:0] s1,   // a + b + 1
  output logic         c1
);
  always_comb begin
    {c0, s0} = {1'b0, a} + {1'b0, b};
    {c1, s1} = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, 1'b1};
  end
endmodule
