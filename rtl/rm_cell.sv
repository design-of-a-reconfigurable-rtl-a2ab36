// rm_cell: one-bit reconfigurable multiplier cell.
//
// The cell forms the partial-product bit a & b, gated by an enable that is
// the XOR of its vertical (column) control v and horizontal (row) control h,
// i.e. a three-input AND of a, b and (v ^ h). A full adder adds that bit to
// the sum arriving from the row above (s_in) and the carry arriving from the
// cell to its right (c_in). When v == h the cell is disabled: its partial
// product is forced to 0 and the adder only passes s_in and c_in on, so the
// cell contributes nothing to the result. The XOR, the three-input AND and
// the full adder are as the cell diagram draws them; the control, A and B
// lines that the drawing runs through the cell are plain wires of the array
// and are not repeated as ports here. Purely combinational.
module rm_cell (
  input  logic a,     // multiplicand bit of this column
  input  logic b,     // multiplier bit of this row
  input  logic v,     // vertical control of this column
  input  logic h,     // horizontal control of this row
  input  logic s_in,  // sum from the row above
  input  logic c_in,  // carry from the right-hand neighbour
  output logic s_out,
  output logic c_out
);

  logic en;
  logic pp;

  always_comb begin
    en = v ^ h;
    pp = a & b & en;
  end

  rm_fa u_fa (
    .a   (pp),
    .b   (s_in),
    .cin (c_in),
    .s   (s_out),
    .cout(c_out)
  );

endmodule
