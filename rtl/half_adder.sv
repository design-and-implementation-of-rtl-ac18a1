// half_adder: one-bit half adder.
//
// Adds two bits: sum = a ^ b, carry = a & b. Purely combinational, no clock.
// In the 4x4 Vedic multiplier it joins the carry outs of the first two
// ripple carry adders into a two-bit weight that feeds the last adder.
// The block and its place in the multiplier follow the document; the gate
// equations are the textbook half adder.
module half_adder (
  input  logic a,      // first addend bit
  input  logic b,      // second addend bit
  output logic sum,    // a xor b
  output logic carry   // a and b
);
  always_comb begin
    sum   = a ^ b;
    carry = a & b;
  end
endmodule
