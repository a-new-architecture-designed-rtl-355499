// tb_cg0: exhaustive self-checking test of carry generator CG0.
// For every pair of 8-bit operands a, b the half-sum and half-carry words are
// formed and fed to the generator. Bit j of its output must equal the carry
// out of bit position j of the integer sum a + b + 0, obtained by adding the
// low j+1 bits of the operands with ordinary arithmetic.
module tb_cg0;
  localparam int unsigned N = 8;

  logic [N-1:0] a = '0, b = '0, s0, c0, c;
  int checks = 0, failures = 0;

  assign s0 = a ^ b;
  assign c0 = a & b;

  cg0 #(.N(N)) dut (.s0(s0), .c0(c0), .c(c));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] exp_c;
    int unsigned mask, sum;
    for (int i = 0; i < (1 << N); i++) begin
      for (int k = 0; k < (1 << N); k++) begin
        a = N'(i); b = N'(k);
        #1;
        for (int j = 0; j < N; j++) begin
          mask = (32'd1 << (j + 1)) - 1;
          sum  = (i & mask) + (k & mask) + 0;
          exp_c[j] = sum[j+1];
        end
        checks++;
        if (c !== exp_c) begin
          failures++;
          if (failures < 10) $display("cg0 mismatch a=%h b=%h c=%h expected %h", a, b, c, exp_c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
