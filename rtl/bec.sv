// bec: binary to excess-1 converter.
//
// Adds one to a W-bit value together with the carry that came with it:
// bit i flips when all bits below it are 1, and the carry out is set when
// the carry in was already 1 or the whole word was all ones. In the
// square-root carry select adder it replaces the second ripple adder of
// each group (the one that would assume carry-in 1): its result is the
// carry-in-0 sum plus one. Combinational.
module bec #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] b,      // sum computed with carry-in 0
  input  logic         bc,     // its carry out
  output logic [W-1:0] x,      // b + 1
  output logic         xc      // carry out of the carry-in-1 sum
);

  logic [W:0] all1;   // all1[i]: bits below i are all ones

  assign all1[0] = 1'b1;
  for (genvar i = 0; i < W; i++) begin : g_bit
    assign x[i]      = b[i] ^ all1[i];
    assign all1[i+1] = all1[i] & b[i];
  end

  assign xc = bc | all1[W];

endmodule
