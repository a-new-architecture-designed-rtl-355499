// tb_fsg: exhaustive self-checking test of the final sum generator.
// For every pair of 8-bit operands and both input carries, the half sum and
// the true carry word of a + b + cin (bit j = carry out of position j, taken
// from integer additions of the low bits) are fed to the unit. Its sum and
// carry out must equal the integer sum a + b + cin.
module tb_fsg;
  localparam int unsigned N = 8;

  logic         cin = 1'b0;
  logic [N-1:0] a = '0, b = '0, s0, c = '0, s;
  logic         cout;
  int checks = 0, failures = 0;

  assign s0 = a ^ b;

  fsg #(.N(N)) dut (.cin(cin), .s0(s0), .c(c), .s(s), .cout(cout));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned mask, part, total;
    for (int ci = 0; ci < 2; ci++) begin
      for (int i = 0; i < (1 << N); i++) begin
        for (int k = 0; k < (1 << N); k++) begin
          a = N'(i); b = N'(k); cin = ci[0];
          for (int j = 0; j < N; j++) begin
            mask = (32'd1 << (j + 1)) - 1;
            part = (i & mask) + (k & mask) + ci;
            c[j] = part[j+1];
          end
          #1;
          total = i + k + ci;
          checks++;
          if (s !== total[N-1:0] || cout !== total[N]) begin
            failures++;
            if (failures < 10) $display("fsg mismatch a=%h b=%h cin=%b s=%h cout=%b expected %h", a, b, cin, s, cout, total[N:0]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
