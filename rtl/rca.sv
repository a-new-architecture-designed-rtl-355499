// rca: N-bit ripple-carry adder.
//
// A chain of full adders: at each bit the sum is a ^ b ^ carry and the carry
// out is a & b | (a ^ b) & carry. It is the least significant stage of the
// square-root CSLA, where the input carry is known early and a carry-select
// stage would gain nothing.
//
// Interface: a, b operands, cin input carry; s sum, cout output carry.
// Each bit uses the split form of the published ripple-carry logic: a half
// sum a ^ b and half carry a & b, then the full sum (half sum ^ carry) and
// full carry (half carry | half sum & carry).
// Purely combinational. The 2-bit default is the width of the first stage of
// the published 16-bit SQRT CSLA.
module rca #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  logic [N:0] carry;  // carry[j] is the carry into bit j

  assign carry[0] = cin;

  for (genvar j = 0; j < N; j++) begin : g_fa
    assign s[j]       = a[j] ^ b[j] ^ carry[j];
    assign carry[j+1] = (a[j] & b[j]) | ((a[j] ^ b[j]) & carry[j]);
  end

  assign cout = carry[N];

endmodule
