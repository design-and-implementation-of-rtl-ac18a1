// rca4: 4-bit ripple carry adder.
//
// Four full adders in a chain; the carry out of bit i is the carry in of
// bit i+1, so the result settles after four carry delays. Purely
// combinational: {cout, sum} = a + b + cin. The multiplier of the document
// uses three of these (with cin tied to 0); the carry in is kept as a port
// so the adder is a general cell. The width and the ripple structure follow
// the document's block name; the full adder cell is the textbook one.
module rca4 #(
  parameter int unsigned W = 4   // adder width in bits (4 in the document)
) (
  input  logic [W-1:0] a,     // first addend
  input  logic [W-1:0] b,     // second addend
  input  logic         cin,   // carry into bit 0
  output logic [W-1:0] sum,   // sum bits
  output logic         cout   // carry out of bit W-1
);
  logic [W:0] c;   // c[i] is the carry into bit i

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[W];
endmodule
