// tb_cs_unit: self-checking test of the carry select unit.
// Pairs of carry words are drawn at random under the rule that holds between
// the outputs of CG0 and CG1 (every bit set in the cin=0 word is also set in
// the cin=1 word); the output must equal a plain 2-to-1 multiplexer. The
// corner pairs (all zero, all one, cin=0 word empty with cin=1 word full) are
// applied too, for both values of cin.
module tb_cs_unit;
  localparam int unsigned N = 8;

  logic         cin = 1'b0;
  logic [N-1:0] c_0 = '0, c_1 = '0, c;
  int checks = 0, failures = 0;

  cs_unit #(.N(N)) dut (.cin(cin), .c_0(c_0), .c_1(c_1), .c(c));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic ci, input logic [N-1:0] w0, input logic [N-1:0] w1);
    logic [N-1:0] exp_c;
    cin = ci; c_0 = w0; c_1 = w1;
    #1;
    exp_c = ci ? w1 : w0;
    checks++;
    if (c !== exp_c) begin
      failures++;
      if (failures < 10) $display("cs mismatch cin=%b c_0=%h c_1=%h c=%h expected %h", ci, w0, w1, c, exp_c);
    end
  endtask

  initial begin
    logic [N-1:0] w0, w1;
    for (int ci = 0; ci < 2; ci++) begin
      apply(ci[0], '0, '0);
      apply(ci[0], '1, '1);
      apply(ci[0], '0, '1);
    end
    for (int t = 0; t < 20000; t++) begin
      w1 = N'($urandom);
      w0 = w1 & N'($urandom);
      apply(1'($urandom), w0, w1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
