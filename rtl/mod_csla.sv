// mod_csla: modified carry-select adder (CSLA), N bits.
//
// A conventional CSLA runs two ripple-carry adders, one for each possible
// input carry, and then throws one of the two sum words away. This adder
// instead computes only the two anticipated *carry* words and selects between
// them before any sum bit is formed:
//
//   hsg     : s0 = a ^ b, c0 = a & b                       (shared half sum)
//   cg0/cg1 : carry words for input carry 0 and 1           (AND-OR ripples)
//   cs_unit : c = c^0 | (cin & c^1)                          (select carries)
//   fsg     : s = s0 ^ {c[N-2:0], cin}, cout = c[N-1]        (final sum)
//
// Only one XOR row forms the sum, the select unit is N bits wide instead of
// N+1, and the output carry leaves straight from the select unit, which makes
// the block a good stage for a square-root CSLA, where each stage's carry-in
// arrives late.
//
// Interface: a, b operands, cin input carry; s sum, cout output carry.
// Purely combinational. The structure follows the published design; the
// default width N = 8 is this design's own choice.
module mod_csla #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  logic [N-1:0] s0, c0;        // half sum and half carry
  logic [N-1:0] cw0, cw1;      // anticipated carry words for cin = 0 / 1
  logic [N-1:0] c;             // selected carry word

  hsg     #(.N(N)) u_hsg (.a(a), .b(b), .s0(s0), .c0(c0));
  cg0     #(.N(N)) u_cg0 (.s0(s0), .c0(c0), .c(cw0));
  cg1     #(.N(N)) u_cg1 (.s0(s0), .c0(c0), .c(cw1));
  cs_unit #(.N(N)) u_cs  (.cin(cin), .c_0(cw0), .c_1(cw1), .c(c));
  fsg     #(.N(N)) u_fsg (.cin(cin), .s0(s0), .c(c), .s(s), .cout(cout));

endmodule
