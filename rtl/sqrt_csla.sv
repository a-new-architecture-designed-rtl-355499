// sqrt_csla: 16-bit square-root carry-select adder built from modified CSLAs.
//
// The adder is cut into stages of growing width, least significant first: a
// 2-bit ripple-carry adder, then modified carry-select adders (mod_csla) of 2,
// 3, 4 and 5 bits. Each CSLA stage works out both of its anticipated carry
// words from its own operand bits while the lower stages are still busy, so
// when its carry-in arrives only the AND-OR select gate and the final XOR row
// remain. Stages grow by one bit because a wider stage has proportionally more
// time before its carry-in is ready. Each stage's cout drives the next stage's
// cin; the last stage's cout is the adder's carry out.
//
// Interface: a, b are the 16-bit operands and cin the input carry; s is the
// 16-bit sum and cout the output carry. Purely combinational, no clock: a
// result is valid one combinational delay after the operands.
//
// The stage widths come from the published 16-bit design and are a parameter
// (STAGE_W, stage 0 being the RCA). The input carry port is this design's
// choice; the published figures show only operands, sum and carry out.
module sqrt_csla
  import csla_pkg::*;
#(
  parameter stage_widths_t STAGE_W = SQRT16_WIDTHS,
  localparam int unsigned  W       = total_width(STAGE_W)
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  // stage_c[k] is the carry into stage k; stage_c[SQRT_STAGES] the carry out.
  logic [SQRT_STAGES:0] stage_c;

  assign stage_c[0] = cin;

  for (genvar k = 0; k < SQRT_STAGES; k++) begin : g_stage
    localparam int unsigned LSB = stage_lsb(STAGE_W, k);
    localparam int unsigned SW  = STAGE_W[k];
    if (k == 0) begin : g_rca
      rca #(.N(SW)) u_rca (
        .a(a[LSB +: SW]), .b(b[LSB +: SW]), .cin(stage_c[k]),
        .s(s[LSB +: SW]), .cout(stage_c[k+1])
      );
    end else begin : g_csla
      mod_csla #(.N(SW)) u_csla (
        .a(a[LSB +: SW]), .b(b[LSB +: SW]), .cin(stage_c[k]),
        .s(s[LSB +: SW]), .cout(stage_c[k+1])
      );
    end
  end

  assign cout = stage_c[SQRT_STAGES];

endmodule
