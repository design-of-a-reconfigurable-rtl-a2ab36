// rm_fir4: TAPS-tap FIR filter built on reconfigurable multipliers.
//
//   y(t) = sum_k coef[k] * x(t-k),  k = 0 .. TAPS-1
//
// Each rm_array instance is 2*DATA_W bits wide and is split at its middle, so
// it performs two independent DATA_W x DATA_W multiplications in one pass:
// multiplier m forms coef[2m] * x(t-2m) in its low product half and
// coef[2m+1] * x(t-2m-1) in its high half. With the default TAPS = 4 this
// is two multipliers for four taps (b0 with b1, b2 with b3), half the
// multiplier count of the plain direct form. The four sub-products are then
// added in one adder tree.
//
// Samples and coefficients are unsigned, as the array multiplier is. The
// sample width of 8 bits follows from splitting a 16-bit multiplier in two;
// the handshake, reset and output register are this design's choices.
//
// Timing: when in_valid is high at a rising clock edge, x_in is taken as
// x(t), the delay line shifts, and y(t) is registered at that same edge, so
// y and out_valid appear one clock after the sample (latency 1, one sample
// per clock). coef is a static configuration input. rst_n is an
// asynchronous active-low reset that clears the delay line and the output.
module rm_fir4 #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned TAPS   = 4,
  localparam int unsigned Y_W   = 2 * DATA_W + $clog2(TAPS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] x_in,
  input  logic [DATA_W-1:0] coef [TAPS],
  output logic              out_valid,
  output logic [Y_W-1:0]    y
);

  import rm_pkg::*;

  localparam int unsigned MW    = 2 * DATA_W;  // multiplier width
  localparam int unsigned NMULT = TAPS / 2;

  if (TAPS < 2 || TAPS % 2 != 0) begin : g_taps_check
    $error("rm_fir4: TAPS must be even and at least 2");
  end

  // Split control words: low half of A times low half of B, high times high.
  localparam ctrl_word_t V_FULL = split_v(DATA_W, MW);
  localparam ctrl_word_t H_FULL = split_h(DATA_W, MW);
  localparam logic [MW-1:0] V_SPLIT = V_FULL[MW-1:0];
  localparam logic [MW-1:0] H_SPLIT = H_FULL[MW-1:0];

  // taps[0] is the current sample, taps[k] the sample k clocks old.
  logic [DATA_W-1:0] taps  [TAPS];
  logic [DATA_W-1:0] delay [1:TAPS-1];

  always_comb begin
    taps[0] = x_in;
    for (int k = 1; k < TAPS; k++) taps[k] = delay[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < TAPS; k++) delay[k] <= '0;
    end else if (in_valid) begin
      delay[1] <= x_in;
      for (int k = 2; k < TAPS; k++) delay[k] <= delay[k-1];
    end
  end

  logic [2*MW-1:0] prod [NMULT];

  for (genvar m = 0; m < NMULT; m++) begin : g_mult
    rm_array #(.WIDTH(MW)) u_mult (
      .a({taps[2*m+1], taps[2*m]}),
      .b({coef[2*m+1], coef[2*m]}),
      .v(V_SPLIT),
      .h(H_SPLIT),
      .p(prod[m])
    );
  end

  logic [Y_W-1:0] sum;

  always_comb begin
    sum = '0;
    for (int m = 0; m < NMULT; m++) begin
      sum = sum + Y_W'(prod[m][MW-1:0]) + Y_W'(prod[m][2*MW-1:MW]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= sum;
    end
  end

endmodule
