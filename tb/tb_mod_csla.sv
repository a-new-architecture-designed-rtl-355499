// tb_mod_csla: exhaustive self-checking test of the modified carry-select adder at its
// default width of 8 bits. Every operand pair and both input carries are
// applied; sum and carry out must equal the integer sum a + b + cin.
module tb_mod_csla;
  localparam int unsigned N = 8;

  logic [N-1:0] a = '0, b = '0, s;
  logic         cin = 1'b0, cout;
  int checks = 0, failures = 0;

  mod_csla dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned total;
    for (int ci = 0; ci < 2; ci++) begin
      for (int i = 0; i < (1 << N); i++) begin
        for (int k = 0; k < (1 << N); k++) begin
          a = N'(i); b = N'(k); cin = ci[0];
          #1;
          total = i + k + ci;
          checks++;
          if ({cout, s} !== total[N:0]) begin
            failures++;
            if (failures < 10) $display("mod_csla mismatch a=%h b=%h cin=%b got %h expected %h", a, b, cin, {cout, s}, total[N:0]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
