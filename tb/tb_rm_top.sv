// tb_rm_top: end-to-end check of rm_top at its default sizes.
//
// Stand-alone 16-bit multiplier: full-precision products, two-way splits at
// random points, the 4-bit-operand 2 x 2 split and its worst case 15 x 15,
// 4 x 4 beside 10 x 4, and random control words, each against an
// independent reference. FIR side: a sample stream with idle cycles and a
// mid-stream reset, checked against y(t) = sum coef[k] x(t-k) with a latency
// of one clock. The bench counts how often each mechanism occurred (full
// precision, split into parallel products, a disabled cell whose operand bits
// were both 1 and so had to be bypassed, FIR outputs, FIR idle cycles, FIR
// reset) and counts a failure for any that never happened.
module tb_rm_top;
  import rm_pkg::*;

  localparam int unsigned W      = 16;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned TAPS   = 4;
  localparam int unsigned Y_W    = 2 * DATA_W + $clog2(TAPS);

  logic              clk = 1'b0;
  logic              rst_n;
  logic [W-1:0]      mul_a, mul_b, mul_v, mul_h;
  logic [2*W-1:0]    mul_p;
  logic              fir_in_valid;
  logic [DATA_W-1:0] fir_x;
  logic [DATA_W-1:0] fir_coef [TAPS];
  logic              fir_out_valid;
  logic [Y_W-1:0]    fir_y;

  int checks = 0, failures = 0;
  int n_full = 0, n_split = 0, n_bypass = 0;
  int n_fir_out = 0, n_fir_idle = 0, n_fir_reset = 0;

  rm_top dut (
    .clk(clk), .rst_n(rst_n),
    .mul_a(mul_a), .mul_b(mul_b), .mul_v(mul_v), .mul_h(mul_h), .mul_p(mul_p),
    .fir_in_valid(fir_in_valid), .fir_x(fir_x), .fir_coef(fir_coef),
    .fir_out_valid(fir_out_valid), .fir_y(fir_y)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- multiplier reference ----------------
  function automatic logic [2*W-1:0] masked_product(logic [W-1:0] a, logic [W-1:0] b,
                                                    logic [W-1:0] v, logic [W-1:0] h);
    logic [2*W-1:0] acc;
    acc = '0;
    for (int i = 0; i < W; i++)
      for (int j = 0; j < W; j++)
        if (a[i] && b[j] && (v[i] != h[j])) acc += (2*W)'(1) << (i + j);
    return acc;
  endfunction

  function automatic bit has_bypass(logic [W-1:0] a, logic [W-1:0] b,
                                    logic [W-1:0] v, logic [W-1:0] h);
    for (int i = 0; i < W; i++)
      for (int j = 0; j < W; j++)
        if (a[i] && b[j] && (v[i] == h[j])) return 1'b1;
    return 1'b0;
  endfunction

  task automatic mul_check(string what, logic [W-1:0] a, logic [W-1:0] b,
                           logic [W-1:0] v, logic [W-1:0] h, logic [2*W-1:0] expv);
    mul_a = a; mul_b = b; mul_v = v; mul_h = h;
    #1;
    checks++;
    if (has_bypass(a, b, v, h)) n_bypass++;
    if (mul_p !== expv) begin
      failures++;
      $display("FAIL %s: a=%h b=%h v=%h h=%h got %h want %h", what, a, b, v, h, mul_p, expv);
    end
  endtask

  function automatic logic [W-1:0] sv(int unsigned k);
    ctrl_word_t t = split_v(k, W);
    return t[W-1:0];
  endfunction
  function automatic logic [W-1:0] sh(int unsigned k);
    ctrl_word_t t = split_h(k, W);
    return t[W-1:0];
  endfunction

  task automatic run_multiplier();
    // Full precision: 4-bit operands times 9, then random 16 x 16.
    for (int unsigned x = 15; x >= 9; x--) begin
      mul_check("full 4b", W'(x), W'(9), sv(W), sh(W), (2*W)'(x * 9));
      n_full++;
    end
    for (int n = 0; n < 200; n++) begin
      logic [W-1:0] a, b;
      a = W'($urandom); b = W'($urandom);
      mul_check("full", a, b, sv(W), sh(W), (2*W)'(a) * (2*W)'(b));
      n_full++;
    end
    // 4-bit operands split into two 2 x 2 products.
    for (int unsigned x = 15; x >= 6; x--) begin
      logic [3:0] a4;
      a4 = 4'(x);
      mul_check("2x2", W'(x), W'(7), sv(2), sh(2),
                (2*W)'({4'(a4[3:2] * 2'b01), 4'(a4[1:0] * 2'b11)}));
      n_split++;
    end
    mul_check("2x2 worst", W'(15), W'(15), sv(2), sh(2), (2*W)'(153));
    n_split++;
    // Two 8 x 8 products and splits at random points.
    for (int n = 0; n < 200; n++) begin
      logic [W-1:0] a, b, lo_mask;
      int unsigned k;
      k = (n < 50) ? 8 : 1 + ($urandom % (W - 1));
      a = W'($urandom); b = W'($urandom);
      lo_mask = W'((32'(1) << k) - 1);
      mul_check("split", a, b, sv(k), sh(k),
                (((2*W)'(a >> k) * (2*W)'(b >> k)) << (2*k)) |
                ((2*W)'(a & lo_mask) * (2*W)'(b & lo_mask)));
      n_split++;
    end
    // 4 x 4 beside 10 x 4.
    for (int n = 0; n < 50; n++) begin
      logic [3:0] al, bl, bh;
      logic [9:0] ah;
      al = 4'($urandom); bl = 4'($urandom); ah = 10'($urandom); bh = 4'($urandom);
      mul_check("4x4+10x4", {2'b00, ah, al}, {8'h00, bh, bl}, 16'hFFF0, 16'h000F,
                (((2*W)'(ah) * (2*W)'(bh)) << 8) | ((2*W)'(al) * (2*W)'(bl)));
      n_split++;
    end
    // Arbitrary control words.
    for (int n = 0; n < 200; n++) begin
      logic [W-1:0] a, b, v, h;
      a = W'($urandom); b = W'($urandom); v = W'($urandom); h = W'($urandom);
      mul_check("random ctrl", a, b, v, h, masked_product(a, b, v, h));
    end
  endtask

  // ---------------- FIR reference ----------------
  logic [DATA_W-1:0] hist [TAPS];

  function automatic logic [Y_W-1:0] ref_y(logic [DATA_W-1:0] xnew);
    logic [Y_W-1:0] acc;
    acc = Y_W'(fir_coef[0]) * Y_W'(xnew);
    for (int k = 1; k < TAPS; k++) acc += Y_W'(fir_coef[k]) * Y_W'(hist[k-1]);
    return acc;
  endfunction

  task automatic fir_run(int n, int idle_pct);
    for (int s = 0; s < n; s++) begin
      logic [Y_W-1:0] expv;
      logic v;
      v = ($urandom % 100) >= idle_pct;
      @(negedge clk);
      fir_in_valid = v;
      fir_x = DATA_W'($urandom);
      expv = ref_y(fir_x);
      @(posedge clk);
      #1;
      checks++;
      if (fir_out_valid !== v) begin
        failures++;
        $display("FAIL fir_out_valid=%0b want %0b", fir_out_valid, v);
      end
      if (v) begin
        n_fir_out++;
        checks++;
        if (fir_y !== expv) begin
          failures++;
          $display("FAIL fir_y=%0d want %0d", fir_y, expv);
        end
        for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = fir_x;
      end else begin
        n_fir_idle++;
      end
    end
  endtask

  task automatic count(string what, int n);
    checks++;
    $display("%-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    fir_in_valid = 1'b0;
    fir_x = '0;
    mul_a = '0; mul_b = '0; mul_v = '0; mul_h = '1;
    foreach (hist[k]) hist[k] = '0;
    for (int k = 0; k < TAPS; k++) fir_coef[k] = DATA_W'($urandom);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    run_multiplier();
    fir_run(300, 25);

    @(negedge clk) rst_n = 1'b0;
    fir_in_valid = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    n_fir_reset++;
    foreach (hist[k]) hist[k] = '0;
    for (int k = 0; k < TAPS; k++) fir_coef[k] = DATA_W'($urandom);
    fir_run(300, 10);

    count("full-precision products", n_full);
    count("split (parallel) products", n_split);
    count("disabled cells bypassed", n_bypass);
    count("FIR outputs", n_fir_out);
    count("FIR idle cycles", n_fir_idle);
    count("FIR resets", n_fir_reset);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
