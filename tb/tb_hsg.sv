// tb_hsg: exhaustive self-checking test of the half-sum generator.
// Every pair of 8-bit operands is applied; the expected half sum and half
// carry are rebuilt bit by bit from the truth table of a half adder
// (sum = 1 when exactly one input is 1, carry = 1 when both are).
module tb_hsg;
  localparam int unsigned N = 8;

  logic [N-1:0] a = '0, b = '0, s0, c0;
  int checks = 0, failures = 0;

  hsg #(.N(N)) dut (.a(a), .b(b), .s0(s0), .c0(c0));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] es, ec;
    for (int i = 0; i < (1 << N); i++) begin
      for (int k = 0; k < (1 << N); k++) begin
        a = N'(i); b = N'(k);
        #1;
        for (int j = 0; j < N; j++) begin
          es[j] = (int'(a[j]) + int'(b[j])) == 1;
          ec[j] = (int'(a[j]) + int'(b[j])) == 2;
        end
        checks++;
        if (s0 !== es || c0 !== ec) begin
          failures++;
          if (failures < 10) $display("hsg mismatch a=%h b=%h s0=%h/%h c0=%h/%h", a, b, s0, es, c0, ec);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
