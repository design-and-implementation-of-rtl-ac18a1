// bme_gate: 4-input, 4-output BME gate that forms two partial products.
//
//   p = a            (garbage)
//   q = (a & b) ^ c
//   r = (a & d) ^ c
//   s = (~a & b) ^ d (garbage)
// With c = 0 the useful outputs are q = a b and r = a d: one multiplicand
// bit times two multiplier bits. Combinational.
// The document names the gate, says it produces the partial products and
// shows q and r as a b and a d with c = 0; the two garbage outputs are this
// design's own choice. No mapping of four bits to four bits can give a b
// and a d on two outputs with c = 0 and still be one-to-one (five input
// patterns then give 0 on both), so this model is not claimed reversible.
module bme_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  always_comb begin
    p = a;
    q = (a & b) ^ c;
    r = (a & d) ^ c;
    s = (~a & b) ^ d;
  end
endmodule
