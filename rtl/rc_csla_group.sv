// rc_csla_group: one group of the reduced-complexity square-root carry
// select adder.
//
// Bit 0 is a full adder that takes the group's carry-in. Every higher bit
// has only a half adder (half sum h = a^b, generate g = a&b); the carry
// into bit i+1 is g | (h & c) and the sum bit is h ^ c, so the full adder
// of a plain ripple adder is split into a shared half adder and a small
// carry merge. This layout (full adder on bit 0 with Cin, half adders on
// bits 1..3, outputs S0..S3 and Cout) follows the paper's 4-bit figure;
// the width is a parameter here, default 4.
//
// Purely combinational: S and COUT settle one ripple through the group
// after A, B or CIN change.
module rc_csla_group #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W-1:0] h, g;   // half adder sum and carry of each bit
  logic [W:0]   c;      // carry into each bit

  assign h    = a ^ b;
  assign g    = a & b;
  assign c[0] = cin;

  // bit 0: full adder; bits 1..W-1: half adder plus carry merge
  for (genvar i = 0; i < W; i++) begin : g_bit
    assign s[i]   = h[i] ^ c[i];
    assign c[i+1] = g[i] | (h[i] & c[i]);
  end

  assign cout = c[W];

endmodule
