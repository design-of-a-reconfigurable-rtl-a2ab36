// tb_rm_fa: exhaustive self-check of the one-bit full adder.
// All eight input combinations are applied; the expected sum and carry are
// the two bits of the arithmetic sum a + b + cin.
module tb_rm_fa;
  logic a, b, cin, s, cout;
  int checks = 0, failures = 0;

  rm_fa dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 8; n++) begin
      logic [1:0] exp_sum;
      {a, b, cin} = 3'(n);
      #1;
      exp_sum = 2'(a) + 2'(b) + 2'(cin);
      checks++;
      if ({cout, s} !== exp_sum) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b: got %0b%0b want %0b", a, b, cin, cout, s, exp_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
