// mac_unit: multiply-accumulate, y = c + a * b.
//
// The product of the modified Booth multiplier (booth_mult) is sign
// extended to the accumulator width CW and added to the incoming partial
// sum c by a square-root carry select adder (sqrt_csla). Chaining these
// units forms the multiplier-and-adder row of a direct-form FIR filter.
// All operands are two's complement; CW must be at least AW+BW.
// Combinational; the caller places the pipeline registers.
//
// The paper names a modified-Booth, carry-select based MAC but does not
// draw its insides; one multiplier followed by one adder is the simplest
// unit that does the job.
module mac_unit #(
  parameter int unsigned AW = 16,
  parameter int unsigned BW = 8,
  parameter int unsigned CW = AW + BW + 2
) (
  input  logic [AW-1:0] a,   // data (multiplicand)
  input  logic [BW-1:0] b,   // coefficient (multiplier)
  input  logic [CW-1:0] c,   // incoming partial sum
  output logic [CW-1:0] y    // c + a*b, modulo 2^CW
);

  logic [AW+BW-1:0] p;
  logic [CW-1:0]    px;
  logic             unused_cout;

  booth_mult #(.AW(AW), .BW(BW)) u_mul (.a(a), .b(b), .p(p));

  assign px = CW'($signed(p));

  sqrt_csla #(.N(CW)) u_add (.a(c), .b(px), .cin(1'b0), .s(y), .cout(unused_cout));

endmodule
