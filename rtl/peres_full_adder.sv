// peres_full_adder -- one-bit full adder from two cascaded Peres gates.
//
// The first Peres gate receives (A, B, 0) and yields A, A xor B and AB. The
// second gate receives (A xor B, Cin, AB) and yields
//   G2   = A xor B                 (garbage),
//   S    = A xor B xor Cin         (sum),
//   Cout = (A xor B) Cin xor AB    (carry).
// The first gate's P output (= A) is the second garbage output G1. Seen from
// outside this is a single 4x4 reversible cell (inputs A, B, 0, Cin; outputs
// G1, G2, S, Cout), which is the node cell of the adder tree. The wiring
// follows the source design; tying the constant input to 0 inside the module
// is this design's choice.
//
// Interface: a, b, cin in; g1, g2 (garbage), s, cout out, all 1 bit.
// Timing: purely combinational; the carry path is one AND/XOR stage of the
// second gate.
module peres_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic g1,
  output logic g2,
  output logic s,
  output logic cout
);

  logic a_xor_b;  // Q of the first gate
  logic a_and_b;  // R of the first gate (C input tied to 0)

  peres_gate u_pg1 (
    .a (a),
    .b (b),
    .c (1'b0),
    .p (g1),
    .q (a_xor_b),
    .r (a_and_b)
  );

  peres_gate u_pg2 (
    .a (a_xor_b),
    .b (cin),
    .c (a_and_b),
    .p (g2),
    .q (s),
    .r (cout)
  );

endmodule
