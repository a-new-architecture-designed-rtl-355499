// fsg: final sum generator (FSG) unit of the modified carry-select adder.
//
// The selected carry word c holds, at bit j, the carry out of bit position j.
// The sum bit j is the half-sum s0(j) xored with the carry into position j:
// s(0) = s0(0) ^ cin and s(j) = s0(j) ^ c(j-1) for j >= 1 (equation 4(g)).
// The output carry is the most significant bit of c (equation 4(f)), so it
// does not wait for any sum bit.
//
// Interface: cin is the adder's input carry, s0 the half-sum word, c the
// selected carry word; s is the N-bit sum and cout the output carry.
// Purely combinational. The default width N = 8 is this design's own choice.
module fsg #(
  parameter int unsigned N = 8
) (
  input  logic         cin,
  input  logic [N-1:0] s0,
  input  logic [N-1:0] c,
  output logic [N-1:0] s,
  output logic         cout
);

  logic [N-1:0] carry_in;  // carry into each bit position

  always_comb begin
    carry_in[0] = cin;
    for (int unsigned j = 1; j < N; j++)
      carry_in[j] = c[j-1];
    s        = s0 ^ carry_in;
    cout     = c[N-1];
  end

endmodule
