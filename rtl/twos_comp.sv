// twos_comp: two's complement by conversion signal.
//
// Negating a word keeps every bit up to and including its rightmost 1 and
// inverts every bit to the left of it. The conversion signal of bit i is
// the OR of all bits below i; bit i of the result is the input bit XOR
// its conversion signal. No adder and no carry chain is needed, only a
// prefix OR. This rule is the paper's; the prefix-OR chain is the simplest
// way to form it. Combinational, y = -a (mod 2^W).
module twos_comp #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  output logic [W-1:0] y
);

  logic [W-1:0] conv;   // conv[i]: a 1 was seen below bit i

  assign conv[0] = 1'b0;
  for (genvar i = 1; i < W; i++) begin : g_conv
    assign conv[i] = conv[i-1] | a[i-1];
  end

  assign y = a ^ conv;

endmodule
