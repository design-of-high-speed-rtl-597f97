// one_plus_zinv: the 1 + z^-1 section, y[n] = x[n] + x[n-1].
//
// A W-bit register holds the previous sample; a square-root carry select
// adder adds it to the present one. The result is one bit wider, so it
// never overflows. The register loads only on en (one sample per en
// pulse) and clears on reset. x to y is combinational; the stored sample
// changes on the clock edge where en is high.
//
// The paper's block diagram only labels these sections "1+Z^-1"; the
// register-plus-adder form, the extra output bit and the enable are this
// design's choices.
module one_plus_zinv #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] x,
  output logic [W:0]   y
);

  logic [W-1:0] x_d;
  logic         unused_cout;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  x_d <= '0;
    else if (en) x_d <= x;
  end

  sqrt_csla #(.N(W + 1)) u_add (
    .a({x[W-1], x}), .b({x_d[W-1], x_d}), .cin(1'b0), .s(y), .cout(unused_cout)
  );

endmodule
