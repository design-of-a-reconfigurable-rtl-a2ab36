// tb_rm_fir4: self-check of the 4-tap FIR filter on reconfigurable multipliers.
//
// A stream of random 8-bit samples (with idle cycles mixed in) is fed with
// random coefficients, including all-ones samples and coefficients for the
// largest sums. The bench keeps its own sample history and computes
// y(t) = sum coef[k] x(t-k) directly. It checks every output value, that
// out_valid follows in_valid after exactly one clock, that idle cycles do not
// shift the delay line, and that reset clears the history.
module tb_rm_fir4;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned TAPS   = 4;
  localparam int unsigned Y_W    = 2 * DATA_W + $clog2(TAPS);

  logic              clk = 1'b0;
  logic              rst_n;
  logic              in_valid;
  logic [DATA_W-1:0] x_in;
  logic [DATA_W-1:0] coef [TAPS];
  logic              out_valid;
  logic [Y_W-1:0]    y;

  int checks = 0, failures = 0;
  int cycles = 0;

  rm_fir4 #(.DATA_W(DATA_W), .TAPS(TAPS)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in),
    .coef(coef), .out_valid(out_valid), .y(y)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference history: hist[0] is the newest accepted sample.
  logic [DATA_W-1:0] hist [TAPS];

  function automatic logic [Y_W-1:0] ref_y(logic [DATA_W-1:0] xnew);
    logic [Y_W-1:0] acc;
    acc = Y_W'(coef[0]) * Y_W'(xnew);
    for (int k = 1; k < TAPS; k++) acc += Y_W'(coef[k]) * Y_W'(hist[k-1]);
    return acc;
  endfunction

  task automatic run(int n, int idle_pct, bit max_data);
    for (int s = 0; s < n; s++) begin
      logic [Y_W-1:0] expv;
      logic v;
      v = ($urandom % 100) >= idle_pct;
      @(negedge clk);
      in_valid = v;
      x_in = max_data ? '1 : DATA_W'($urandom);
      expv = ref_y(x_in);
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== v) begin
        failures++;
        $display("FAIL out_valid=%0b want %0b at cycle %0d", out_valid, v, cycles);
      end
      if (v) begin
        checks++;
        if (y !== expv) begin
          failures++;
          $display("FAIL y=%0d want %0d (x=%0d) at cycle %0d", y, expv, x_in, cycles);
        end
        for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = x_in;
      end
    end
  endtask

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0;
    x_in = '0;
    foreach (hist[k]) hist[k] = '0;
    for (int k = 0; k < TAPS; k++) coef[k] = DATA_W'($urandom);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    run(200, 0, 1'b0);      // back-to-back samples
    run(200, 40, 1'b0);     // with idle cycles

    for (int k = 0; k < TAPS; k++) coef[k] = '1;
    run(8, 0, 1'b1);        // largest possible output
    checks++;
    if (y !== Y_W'(TAPS * 255 * 255)) begin
      failures++;
      $display("FAIL max output %0d", y);
    end

    // Reset clears the delay line: the first output afterwards has one term.
    @(negedge clk) rst_n = 1'b0;
    in_valid = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    checks++;
    if (out_valid !== 1'b0 || y !== '0) begin
      failures++;
      $display("FAIL reset did not clear the output");
    end
    foreach (hist[k]) hist[k] = '0;
    for (int k = 0; k < TAPS; k++) coef[k] = DATA_W'($urandom);
    run(200, 20, 1'b0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
