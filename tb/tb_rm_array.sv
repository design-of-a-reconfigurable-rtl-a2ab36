// tb_rm_array: self-check of the reconfigurable array multiplier.
//
// Two instances are tested: the 16-bit array and an 8-bit one. The
// reference for any control pattern is the sum over enabled cells
// (v[i] != h[j]) of a[i] b[j] 2^(i+j), worked out bit by bit here. On top of
// random operands and random control words the bench applies:
//   * full precision (v = 0, h = all ones) and its complement,
//   * two-way splits at every point K, checked against the packed pair
//     {a_hi * b_hi, a_lo * b_lo},
//   * the 3-bit / 5-bit split of an 8-bit array,
//   * a 4-bit operand run on the 16-bit array split into two 2 x 2 products
//     (A = 15 .. 6 with B = 7 gives 57 54 51 48 41 38 35 32 25 22; 15 x 15
//     gives 153), and the same operands at full precision (A x 9),
//   * 4 x 4 beside 10 x 4, and two 8 x 8 products, on the 16-bit array.
module tb_rm_array;
  import rm_pkg::*;

  localparam int unsigned W  = 16;
  localparam int unsigned W8 = 8;

  logic [W-1:0]    a, b, v, h;
  logic [2*W-1:0]  p;
  logic [W8-1:0]   a8, b8, v8, h8;
  logic [2*W8-1:0] p8;

  int checks = 0, failures = 0;

  rm_array #(.WIDTH(W))  dut16 (.a(a),  .b(b),  .v(v),  .h(h),  .p(p));
  rm_array #(.WIDTH(W8)) dut8  (.a(a8), .b(b8), .v(v8), .h(h8), .p(p8));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] masked_product(logic [31:0] aa, logic [31:0] bb,
                                                 logic [31:0] vv, logic [31:0] hh,
                                                 int unsigned width);
    logic [63:0] acc;
    acc = '0;
    for (int i = 0; i < width; i++)
      for (int j = 0; j < width; j++)
        if (aa[i] && bb[j] && (vv[i] != hh[j])) acc += 64'(1) << (i + j);
    return acc;
  endfunction

  task automatic check16(string what, logic [2*W-1:0] expv);
    #1;
    checks++;
    if (p !== expv) begin
      failures++;
      $display("FAIL %s: a=%h b=%h v=%h h=%h got %h want %h", what, a, b, v, h, p, expv);
    end
  endtask

  task automatic check8(string what, logic [2*W8-1:0] expv);
    #1;
    checks++;
    if (p8 !== expv) begin
      failures++;
      $display("FAIL %s: a=%h b=%h v=%h h=%h got %h want %h", what, a8, b8, v8, h8, p8, expv);
    end
  endtask

  // Control words of a two-way split at k.
  function automatic logic [W-1:0] sv16(int unsigned k);
    ctrl_word_t t = split_v(k, W);
    return t[W-1:0];
  endfunction
  function automatic logic [W-1:0] sh16(int unsigned k);
    ctrl_word_t t = split_h(k, W);
    return t[W-1:0];
  endfunction

  initial begin
    static int unsigned fixed_a [7] = '{15, 14, 13, 12, 11, 10, 9};
    static int unsigned split_exp [10] = '{57, 54, 51, 48, 41, 38, 35, 32, 25, 22};

    // Full precision: 4-bit operands A = 15 .. 9 times 9.
    v = '0; h = '1;
    foreach (fixed_a[n]) begin
      a = W'(fixed_a[n]); b = W'(9);
      check16("full 4b x 9", (2*W)'(fixed_a[n] * 9));
    end

    // Two 2 x 2 products from a 4-bit operand on the 16-bit array.
    v = sv16(2); h = sh16(2);
    for (int n = 0; n < 10; n++) begin
      a = W'(15 - n); b = W'(7);
      check16("2x2 split", (2*W)'(split_exp[n]));
    end
    a = W'(15); b = W'(15);
    check16("2x2 split 15x15", (2*W)'(153));
    a = W'(10); b = W'(7);
    check16("2x2 split 10x7", (2*W)'(38));

    // Random operands, full precision, both polarities of the controls.
    for (int n = 0; n < 300; n++) begin
      a = W'($urandom); b = W'($urandom);
      if (n % 2 == 0) begin v = '0; h = '1; end else begin v = '1; h = '0; end
      check16("full random", (2*W)'(a) * (2*W)'(b));
    end

    // Two-way split at every point, random operands.
    for (int k = 1; k < W; k++) begin
      for (int n = 0; n < 40; n++) begin
        logic [W-1:0] lo_mask;
        logic [2*W-1:0] lo_p, hi_p;
        a = W'($urandom); b = W'($urandom);
        v = sv16(k); h = sh16(k);
        lo_mask = W'((32'(1) << k) - 1);
        lo_p = (2*W)'(a & lo_mask) * (2*W)'(b & lo_mask);
        hi_p = (2*W)'(a >> k) * (2*W)'(b >> k);
        check16("split", (hi_p << (2*k)) | lo_p);
      end
    end

    // 4 x 4 beside 10 x 4: columns 0..3 x rows 0..3, columns 4..13 x rows 4..7.
    v = 16'hFFF0; h = 16'h000F;
    for (int n = 0; n < 50; n++) begin
      logic [3:0] al, bl, bh;
      logic [9:0] ah;
      al = 4'($urandom); bl = 4'($urandom); ah = 10'($urandom); bh = 4'($urandom);
      a = {2'b00, ah, al}; b = {8'h00, bh, bl};
      check16("4x4 + 10x4", (((2*W)'(ah) * (2*W)'(bh)) << 8) | ((2*W)'(al) * (2*W)'(bl)));
    end

    // Random controls and operands against the bit-level reference.
    for (int n = 0; n < 300; n++) begin
      a = W'($urandom); b = W'($urandom); v = W'($urandom); h = W'($urandom);
      check16("random ctrl", (2*W)'(masked_product(32'(a), 32'(b), 32'(v), 32'(h), W)));
    end

    // 8-bit array: control words 11110000 / 00001111 and the 3/5 split.
    v8 = 8'b1111_0000; h8 = 8'b0000_1111;
    for (int n = 0; n < 100; n++) begin
      a8 = W8'($urandom); b8 = W8'($urandom);
      check8("8b split 4/4", {8'(a8[7:4] * b8[7:4]), 8'(a8[3:0] * b8[3:0])});
    end
    v8 = 8'b1111_1000; h8 = 8'b0000_0111;
    for (int n = 0; n < 100; n++) begin
      a8 = W8'($urandom); b8 = W8'($urandom);
      check8("8b split 3/5", {10'(a8[7:3] * b8[7:3]), 6'(a8[2:0] * b8[2:0])});
    end
    v8 = '0; h8 = '1;
    for (int n = 0; n < 100; n++) begin
      a8 = W8'($urandom); b8 = W8'($urandom);
      check8("8b full", (2*W8)'(a8) * (2*W8)'(b8));
    end
    for (int n = 0; n < 100; n++) begin
      a8 = W8'($urandom); b8 = W8'($urandom); v8 = W8'($urandom); h8 = W8'($urandom);
      check8("8b random ctrl", (2*W8)'(masked_product(32'(a8), 32'(b8), 32'(v8), 32'(h8), W8)));
    end

    // All-ones operands: longest carry chain in full and split modes.
    a = '1; b = '1; v = '0; h = '1;
    check16("ones full", (2*W)'(a) * (2*W)'(b));
    v = sv16(8); h = sh16(8);
    check16("ones 8/8", {16'(8'hFF * 8'hFF), 16'(8'hFF * 8'hFF)});

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
