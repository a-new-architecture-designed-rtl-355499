// cg1: carry generator CG1 of the modified carry-select adder, for an
// anticipated input carry of 1.
//
// It computes the full-carry word c(j) = c(j-1) & s0(j) | c0(j) with
// c(-1) = 1 (equation 4(c)). With the input carry fixed at 1, bit 0 reduces
// to c(0) = s0(0) | c0(0) (an OR gate); every higher bit is one AND-OR gate on
// the ripple path, exactly as in cg0.
//
// Interface: s0, c0 are the half-sum and half-carry words from hsg; c is the
// N-bit carry word c1^1, bit j being the carry out of bit position j.
// Purely combinational. The logic follows the published unit; the default
// width N = 8 is this design's own choice.
module cg1 #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] s0,
  input  logic [N-1:0] c0,
  output logic [N-1:0] c
);

  assign c[0] = s0[0] | c0[0];

  for (genvar j = 1; j < N; j++) begin : g_ripple
    assign c[j] = (c[j-1] & s0[j]) | c0[j];
  end

endmodule
