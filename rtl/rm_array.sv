// rm_array: WIDTH x WIDTH reconfigurable array multiplier (unsigned).
//
// Row j of the array adds the partial products a[i] & b[j] to the running
// sum of the rows above, shifted by one place: cell (i, j) takes its sum-in
// from cell (i+1, j-1), and the leftmost cell takes the carry-out of the
// leftmost cell of the row above. Carries ripple right to left inside each
// row. Row j < WIDTH-1 delivers product bit j from its rightmost cell; the
// last row delivers bits WIDTH-1 .. 2*WIDTH-2 and its final carry is bit
// 2*WIDTH-1. This is the array of the conventional design with every cell
// replaced by the reconfigurable cell, as the published design draws it; the
// 16-bit default is its chip size. Unsigned operands and the absence of any
// register stage are this implementation's reading of an unclocked array.
//
// Every cell (i, j) has its partial product enabled by v[i] ^ h[j]. The
// result is therefore always the sum over enabled cells of
// a[i] b[j] 2^(i+j). With v = 0 and h = all ones it is the ordinary product
// a * b. With v = 1 for columns >= K and h = 1 for rows < K it is
// {a[W-1:K] * b[W-1:K], a[K-1:0] * b[K-1:0]}: two independent products in
// one pass, the low one in p[2K-1:0] and the high one in p[2W-1:2K]. Any
// other V/H pattern is allowed and gives the corresponding masked sum.
//
// Interface: all inputs and the output are plain combinational vectors; the
// block has no clock. The critical path runs along row 0 and then down the
// leftmost column, about 2*WIDTH full-adder delays.
module rm_array #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0]   a,  // multiplicand, one bit per column
  input  logic [WIDTH-1:0]   b,  // multiplier, one bit per row
  input  logic [WIDTH-1:0]   v,  // vertical control, one bit per column
  input  logic [WIDTH-1:0]   h,  // horizontal control, one bit per row
  output logic [2*WIDTH-1:0] p   // product (or concatenated sub-products)
);

  if (WIDTH < 2) begin : g_width_check
    $error("rm_array: WIDTH must be at least 2");
  end

  for (genvar j = 0; j < WIDTH; j++) begin : g_row
    for (genvar i = 0; i < WIDTH; i++) begin : g_col
      logic s_in, c_in, s, c;

      if (j == 0) begin : g_sin_top
        assign s_in = 1'b0;
      end else if (i == WIDTH - 1) begin : g_sin_msb
        assign s_in = g_row[j-1].g_col[WIDTH-1].c;
      end else begin : g_sin_mid
        assign s_in = g_row[j-1].g_col[i+1].s;
      end

      if (i == 0) begin : g_cin_lsb
        assign c_in = 1'b0;
      end else begin : g_cin_mid
        assign c_in = g_row[j].g_col[i-1].c;
      end

      rm_cell u_cell (
        .a    (a[i]),
        .b    (b[j]),
        .v    (v[i]),
        .h    (h[j]),
        .s_in (s_in),
        .c_in (c_in),
        .s_out(s),
        .c_out(c)
      );
    end

    if (j < WIDTH - 1) begin : g_out_low
      assign p[j] = g_row[j].g_col[0].s;
    end
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_out_high
    assign p[WIDTH-1+i] = g_row[WIDTH-1].g_col[i].s;
  end
  assign p[2*WIDTH-1] = g_row[WIDTH-1].g_col[WIDTH-1].c;

endmodule
