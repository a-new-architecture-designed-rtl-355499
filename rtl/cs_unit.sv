// cs_unit: carry select (CS) unit of the modified carry-select adder.
//
// It chooses one of the two anticipated carry words by the real input carry:
// c = c_0 when cin = 0, c = c_1 when cin = 1 (equations 4(d), 4(e)). A plain
// 2-to-1 multiplexer would do, but the two words are ordered: wherever
// c_0(j) = 1, c_1(j) = 1 as well (a carry that arises with input carry 0 also
// arises with input carry 1). So each bit is a single AND-OR gate,
// c(j) = c_0(j) | (cin & c_1(j)), which is the published gate-level form.
// An assertion checks that ordering on the inputs.
//
// Interface: cin is the input carry; c_0, c_1 are the N-bit carry words from
// cg0 and cg1; c is the selected N-bit carry word. Purely combinational.
// The default width N = 8 is this design's own choice.
module cs_unit #(
  parameter int unsigned N = 8
) (
  input  logic         cin,
  input  logic [N-1:0] c_0,
  input  logic [N-1:0] c_1,
  output logic [N-1:0] c
);

  always_comb begin
    c = c_0 | ({N{cin}} & c_1);
  end

  // The AND-OR form is only a multiplexer while c_0 implies c_1.
  always_comb begin
    assert ((c_0 & ~c_1) == '0)
      else $error("cs_unit: carry word for cin=0 has a bit set that the cin=1 word lacks");
  end

endmodule
