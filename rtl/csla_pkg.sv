// csla_pkg: constants shared by the square-root carry-select adder (SQRT CSLA).
//
// The 16-bit SQRT CSLA is a chain of adder stages of growing width: a 2-bit
// ripple-carry adder followed by modified carry-select adders of 2, 3, 4 and
// 5 bits. These stage widths are the ones of the published 16-bit design.
// The package also gives a helper that turns a list of stage widths into the
// bit position where each stage starts, so the top can be wired by a generate
// loop.
package csla_pkg;

  // Number of stages in the default 16-bit design (one RCA + four CSLAs).
  localparam int unsigned SQRT_STAGES = 5;

  typedef int unsigned stage_widths_t [SQRT_STAGES];

  // Widths of the stages, least significant first. Stage 0 is the RCA.
  localparam stage_widths_t SQRT16_WIDTHS = '{2, 2, 3, 4, 5};

  // Sum of the widths of stages 0 .. k-1, i.e. the lowest bit of stage k.
  function automatic int unsigned stage_lsb(stage_widths_t w, int unsigned k);
    int unsigned acc;
    acc = 0;
    for (int unsigned i = 0; i < SQRT_STAGES; i++)
      if (i < k) acc += w[i];
    return acc;
  endfunction

  // Total adder width.
  function automatic int unsigned total_width(stage_widths_t w);
    return stage_lsb(w, SQRT_STAGES);
  endfunction

endpackage
