// full_adder: one-bit full adder, the cell of the ripple carry adder.
//
// sum = a ^ b ^ cin, cout = majority(a, b, cin). Purely combinational.
// The document only names the ripple carry adder; this cell is the
// textbook one and is this design's own choice.
module full_adder (
  input  logic a,     // first addend bit
  input  logic b,     // second addend bit
  input  logic cin,   // carry in
  output logic sum,   // sum bit
  output logic cout   // carry out
);
  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule
