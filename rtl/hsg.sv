// hsg: half-sum generator (HSG) unit of the modified carry-select adder.
//
// For every bit position j it forms the half-sum s0(j) = a(j) xor b(j) and the
// half-carry c0(j) = a(j) and b(j): one XOR gate and one AND gate per bit, as
// in equation 4(a) of the modified CSLA formulation. Both words feed the two
// carry generators (cg0, cg1) and s0 also feeds the final sum generator (fsg).
//
// Interface: a, b are the N-bit operands; s0, c0 are the N-bit half-sum and
// half-carry words. Purely combinational, no clock.
// The logic follows the published unit exactly; the default width N = 8 is
// this design's own choice (the width of the stand-alone CSLA is not stated).
module hsg #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s0,
  output logic [N-1:0] c0
);

  always_comb begin
    s0 = a ^ b;
    c0 = a & b;
  end

endmodule
