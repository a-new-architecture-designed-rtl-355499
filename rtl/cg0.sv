// cg0: carry generator CG0 of the modified carry-select adder, for an
// anticipated input carry of 0.
//
// It computes the full-carry word c(j) = c(j-1) & s0(j) | c0(j) with
// c(-1) = 0 (equation 4(b)). Because the input carry is fixed at 0, bit 0
// reduces to c(0) = c0(0): no gate is needed there, and every higher bit is a
// single AND-OR gate on the ripple path. This is the optimisation that makes
// CG0 smaller than a full ripple-carry adder: no sum bits are formed.
//
// Interface: s0, c0 are the half-sum and half-carry words from hsg; c is the
// N-bit carry word c1^0, bit j being the carry out of bit position j.
// Bit 0 of s0 is unused by construction: with no input carry the carry out
// of bit 0 is just the half carry, so the unused-bit lint warning stands.
// Purely combinational. The logic follows the published unit; the default
// width N = 8 is this design's own choice.
module cg0 #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] s0,
  input  logic [N-1:0] c0,
  output logic [N-1:0] c
);

  assign c[0] = c0[0];

  for (genvar j = 1; j < N; j++) begin : g_ripple
    assign c[j] = (c[j-1] & s0[j]) | c0[j];
  end

endmodule
