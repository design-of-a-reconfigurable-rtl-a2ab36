// rm_fa: one-bit full adder, the adding element of every multiplier cell.
//
// s = a ^ b ^ cin, cout = majority(a, b, cin). Purely combinational. The
// cell diagrams only name the block "FA"; its gate-level form is the
// textbook one and is this design's choice.
module rm_fa (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  always_comb begin
    s    = a ^ b ^ cin;
    cout = (a & b) | (cin & (a ^ b));
  end

endmodule
