// peres_rca -- WIDTH-bit ripple carry adder made of Peres-gate full adders.
//
// Bit i is a peres_full_adder whose carry-out drives the carry-in of bit
// i+1; the carry-out of the MSB is the adder's carry-out. This is the
// two-operand adder placed at every node of the binary tree adder. The
// original design calls for an RCA built from the reversible full adder; the plain
// bit-serial carry chain is this design's reading of that.
//
// The garbage outputs (G1 = a[i], G2 = a[i] xor b[i]) of each cell carry no
// result and are left unused here; a linter reports them as unused signals,
// which is expected.
//
// Interface: a, b (WIDTH bits), cin in; s (WIDTH bits), cout out.
// Timing: purely combinational; the critical path ripples through WIDTH
// carry stages.
module peres_rca #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  logic [WIDTH-1:0] garbage_g1;
  logic [WIDTH-1:0] garbage_g2;

  // Each stage owns its carry-out net, so the chain is a plain series of
  // separate wires from bit 0 to the MSB.
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    logic ci;  // carry into this bit
    logic co;  // carry out of this bit
    if (i == 0) begin : g_first
      assign ci = cin;
    end else begin : g_next
      assign ci = g_bit[i-1].co;
    end
    peres_full_adder u_fa (
      .a    (a[i]),
      .b    (b[i]),
      .cin  (ci),
      .g1   (garbage_g1[i]),
      .g2   (garbage_g2[i]),
      .s    (s[i]),
      .cout (co)
    );
  end

  assign cout = g_bit[WIDTH-1].co;

endmodule
