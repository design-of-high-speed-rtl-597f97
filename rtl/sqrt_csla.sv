// sqrt_csla: N-bit square-root carry select adder (reduced complexity).
//
// The operands are cut into groups of G = ceil(sqrt(N)) bits, so an N-bit
// add has about sqrt(N) groups (the last may be narrower). The lowest
// group is an rc_csla_group fed with the real carry-in. Every higher group
// computes its sum once with carry-in 0 (rc_csla_group), derives the
// carry-in-1 sum from it with a binary to excess-1 converter (bec) instead
// of a second ripple adder, and a 2:1 multiplexer picks one of the two by
// the carry that arrives from the group below. The worst path is one group
// ripple plus one multiplexer per group.
//
// Grouping into sqrt(N) groups and the BEC in place of the second ripple
// adder follow the paper; the exact group boundaries (equal groups of
// ceil(sqrt(N)) bits) are this design's choice.
//
// Combinational: s = a + b + cin (mod 2^N), cout is the carry out.
module sqrt_csla
  import dsp_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  localparam int unsigned G    = csla_group_w(N);
  localparam int unsigned NGRP = (N + G - 1) / G;

  logic [NGRP:0] gc;   // carry into each group
  assign gc[0] = cin;

  for (genvar k = 0; k < NGRP; k++) begin : g_grp
    localparam int unsigned LO = k * G;
    localparam int unsigned HI = ((k + 1) * G < N) ? (k + 1) * G - 1 : N - 1;
    localparam int unsigned GW = HI - LO + 1;

    if (k == 0) begin : g_first
      rc_csla_group #(.W(GW)) u_add (
        .a(a[HI:LO]), .b(b[HI:LO]), .cin(gc[0]), .s(s[HI:LO]), .cout(gc[1])
      );
    end else begin : g_sel
      logic [GW-1:0] s0, s1;
      logic          c0, c1;
      rc_csla_group #(.W(GW)) u_add0 (
        .a(a[HI:LO]), .b(b[HI:LO]), .cin(1'b0), .s(s0), .cout(c0)
      );
      bec #(.W(GW)) u_bec (.b(s0), .bc(c0), .x(s1), .xc(c1));
      assign s[HI:LO] = gc[k] ? s1 : s0;
      assign gc[k+1]  = gc[k] ? c1 : c0;
    end
  end

  assign cout = gc[NGRP];

endmodule
