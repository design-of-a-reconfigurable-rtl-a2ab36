// rm_top: the reconfigurable multiplier and its FIR application side by side.
//
// mul_*  : a stand-alone WIDTH-bit reconfigurable array multiplier, the core
//          of the test chip. mul_v / mul_h select the precision: v = 0 with
//          h = all ones gives one WIDTH x WIDTH product; v = 1 above bit K and
//          h = 1 below bit K gives two independent products packed as
//          {a_hi * b_hi, a_lo * b_lo}. Combinational, no clock.
// fir_*  : a 4-tap FIR filter whose four multiplications run on two
//          2*FIR_DATA_W-bit reconfigurable multipliers, two products each.
//          One sample per clock, result one clock later (see rm_fir4).
//
// The two parts share only clk/rst_n, which the multiplier does not use.
// The pairing of a bare 16-bit multiplier (as on the test chip, with outside
// equipment driving its pins) and the FIR application follows the published
// design; exposing both side by side in one top is this implementation's
// choice.
module rm_top #(
  parameter int unsigned WIDTH      = 16,
  parameter int unsigned FIR_DATA_W = 8,
  parameter int unsigned FIR_TAPS   = 4,
  localparam int unsigned FIR_Y_W   = 2 * FIR_DATA_W + $clog2(FIR_TAPS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // stand-alone multiplier
  input  logic [WIDTH-1:0]      mul_a,
  input  logic [WIDTH-1:0]      mul_b,
  input  logic [WIDTH-1:0]      mul_v,
  input  logic [WIDTH-1:0]      mul_h,
  output logic [2*WIDTH-1:0]    mul_p,
  // FIR filter
  input  logic                  fir_in_valid,
  input  logic [FIR_DATA_W-1:0] fir_x,
  input  logic [FIR_DATA_W-1:0] fir_coef [FIR_TAPS],
  output logic                  fir_out_valid,
  output logic [FIR_Y_W-1:0]    fir_y
);

  rm_array #(.WIDTH(WIDTH)) u_mult (
    .a(mul_a),
    .b(mul_b),
    .v(mul_v),
    .h(mul_h),
    .p(mul_p)
  );

  rm_fir4 #(.DATA_W(FIR_DATA_W), .TAPS(FIR_TAPS)) u_fir (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (fir_in_valid),
    .x_in     (fir_x),
    .coef     (fir_coef),
    .out_valid(fir_out_valid),
    .y        (fir_y)
  );

endmodule
