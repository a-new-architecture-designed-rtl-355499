// tb_sqrt_csla: end-to-end self-checking test of the 16-bit square-root
// carry-select adder at its default parameters.
//
// Applies directed cases (zero, all ones, a carry that ripples through every
// stage, the operand pair 0x0010 + 0x0010) and then random operand pairs with
// random input carry. Each result {cout, s} must equal the integer sum
// a + b + cin.
//
// It also counts, for each carry-select stage, how often its carry-in was 0
// and how often it was 1 while the stage's bits would propagate a carry (so
// the select unit had to choose the cin=1 carry word and that choice changed
// the result), and how often a carry travelled from the adder's input carry
// through every stage to cout. Each of these must happen at least once. The
// stage carries are worked out from the operands with integer arithmetic,
// not read from the design.
module tb_sqrt_csla;
  import csla_pkg::*;

  localparam int unsigned W = total_width(SQRT16_WIDTHS);

  logic [W-1:0] a = '0, b = '0, s;
  logic         cin = 1'b0, cout;
  int checks = 0, failures = 0;

  int sel0_cnt [SQRT_STAGES];   // stage carry-in = 0
  int sel1_cnt [SQRT_STAGES];   // stage carry-in = 1 and the choice mattered
  int ripple_all_cnt = 0;       // cin propagated through all stages to cout

  sqrt_csla dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] ai, input logic [W-1:0] bi, input logic ci);
    longint unsigned total, low_mask, carry_k;
    int unsigned lsb;
    logic [W-1:0] p;
    a = ai; b = bi; cin = ci;
    #1;
    total = longint'(ai) + longint'(bi) + longint'(ci);
    checks++;
    if ({cout, s} !== total[W:0]) begin
      failures++;
      if (failures < 10) $display("sqrt_csla mismatch a=%h b=%h cin=%b got %h expected %h", ai, bi, ci, {cout, s}, total[W:0]);
    end
    // Stage carry-ins from integer sums of the low bits.
    p = ai ^ bi;
    for (int unsigned k = 1; k < SQRT_STAGES; k++) begin
      lsb      = stage_lsb(SQRT16_WIDTHS, k);
      low_mask = (64'd1 << lsb) - 1;
      carry_k  = ((longint'(ai) & low_mask) + (longint'(bi) & low_mask) + longint'(ci)) >> lsb;
      if (carry_k[0] == 1'b0) sel0_cnt[k]++;
      else if (p[lsb]) sel1_cnt[k]++;
    end
    if (ci && p == '1) ripple_all_cnt++;
  endtask

  initial begin
    foreach (sel0_cnt[k]) begin sel0_cnt[k] = 0; sel1_cnt[k] = 0; end

    apply('0, '0, 1'b0);
    apply('1, '1, 1'b1);
    apply('1, '0, 1'b1);                 // carry ripples through all stages
    apply(16'h0010, 16'h0010, 1'b0);     // 0x0010 + 0x0010 = 0x0020
    apply(16'h8000, 16'h8000, 1'b0);     // carry out from the last stage only
    for (int t = 0; t < 200000; t++)
      apply(W'($urandom), W'($urandom), 1'($urandom));

    for (int unsigned k = 1; k < SQRT_STAGES; k++) begin
      $display("stage %0d: carry-in 0 selected %0d times, carry-in 1 selected (propagating) %0d times",
               k, sel0_cnt[k], sel1_cnt[k]);
      checks += 2;
      if (sel0_cnt[k] == 0) failures++;
      if (sel1_cnt[k] == 0) failures++;
    end
    $display("carry rippled through every stage %0d times", ripple_all_cnt);
    checks++;
    if (ripple_all_cnt == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
