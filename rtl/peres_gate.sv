// peres_gate -- 3x3 reversible Peres gate.
//
// Maps the input vector (A, B, C) to the output vector (P, Q, R) with
//   P = A,  Q = A xor B,  R = (A and B) xor C.
// The mapping is a permutation of the eight input patterns, so every output
// pattern identifies its input uniquely. Realised here as ordinary
// combinational logic; the function and the truth table follow the source
// design's Peres gate definition.
//
// Interface: three 1-bit inputs a, b, c and three 1-bit outputs p, q, r.
// Timing: purely combinational, no clock.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = a ^ b;
    r = (a & b) ^ c;
  end

endmodule
