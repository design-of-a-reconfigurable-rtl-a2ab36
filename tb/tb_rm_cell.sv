// tb_rm_cell: exhaustive self-check of the one-bit reconfigurable cell.
// All 64 combinations of a, b, v, h, s_in, c_in are applied. The expected
// result is s_in + c_in, plus 1 when the cell is enabled (v != h) and
// a = b = 1. A disabled cell must pass s_in and c_in through unchanged in sum.
module tb_rm_cell;
  logic a, b, v, h, s_in, c_in, s_out, c_out;
  int checks = 0, failures = 0;
  int disabled_seen = 0;

  rm_cell dut (.a(a), .b(b), .v(v), .h(h), .s_in(s_in), .c_in(c_in),
               .s_out(s_out), .c_out(c_out));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 64; n++) begin
      logic [1:0] expv;
      logic enabled;
      {a, b, v, h, s_in, c_in} = 6'(n);
      #1;
      enabled = (v != h);
      expv = 2'(s_in) + 2'(c_in) + ((enabled && a && b) ? 2'd1 : 2'd0);
      if (!enabled && a && b) disabled_seen++;
      checks++;
      if ({c_out, s_out} !== expv) begin
        failures++;
        $display("FAIL a=%0b b=%0b v=%0b h=%0b sin=%0b cin=%0b: got %0b%0b want %0b",
                 a, b, v, h, s_in, c_in, c_out, s_out, expv);
      end
    end
    checks++;
    if (disabled_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
