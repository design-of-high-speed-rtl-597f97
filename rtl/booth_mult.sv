// booth_mult: signed radix-4 modified Booth multiplier, p = a * b.
//
// The multiplier b is scanned in overlapping bit triples
// {b[2j+1], b[2j], b[2j-1]} (b[-1] = 0), so a BW-bit multiplier gives only
// ceil(BW/2) partial products. Each triple selects 0, +a, +2a, -a or -2a
// (dsp_pkg::booth_recode). +2a is a one-bit left shift. A negative
// partial product is made by the conversion-signal two's complementer
// (twos_comp): bits above the rightmost 1 of the magnitude are inverted,
// so no separate "+1" has to be added. The sign-extended, shifted partial
// products are summed by a chain of square-root carry select adders
// (sqrt_csla) of product width.
//
// Pair-wise grouping of the multiplier bits, the {0, N, 2N} selection and
// the conversion-signal complement follow the paper; sign extension of
// each partial product to the full product width and the linear adder
// chain are this design's choice. Combinational.
module booth_mult
  import dsp_pkg::*;
#(
  parameter int unsigned AW = 16,   // multiplicand width (two's complement)
  parameter int unsigned BW = 8     // multiplier width (two's complement)
) (
  input  logic [AW-1:0]    a,
  input  logic [BW-1:0]    b,
  output logic [AW+BW-1:0] p
);

  localparam int unsigned PW  = AW + BW;           // product width
  localparam int unsigned BE  = BW + (BW % 2);     // b widened to even width
  localparam int unsigned NPP = BE / 2;            // partial products
  localparam int unsigned MW  = AW + 2;            // width of +-a, +-2a

  logic [BE-1:0] bx;
  logic [MW-1:0] a1, a2;
  assign bx = BE'($signed(b));
  assign a1 = MW'($signed(a));
  assign a2 = {a1[MW-2:0], 1'b0};

  logic [PW-1:0] pp  [NPP];   // shifted, sign-extended partial products
  logic [PW-1:0] acc [NPP];   // running sums

  for (genvar j = 0; j < NPP; j++) begin : g_pp
    booth_sel_e      sel;
    logic [MW-1:0]   mag, neg, ppm;
    logic [2:0]      trip;

    if (j == 0) begin : g_t0
      assign trip = {bx[1], bx[0], 1'b0};
    end else begin : g_tj
      assign trip = {bx[2*j+1], bx[2*j], bx[2*j-1]};
    end

    assign sel = booth_recode(trip);
    assign mag = (sel == BOOTH_P2 || sel == BOOTH_M2) ? a2 : a1;

    twos_comp #(.W(MW)) u_neg (.a(mag), .y(neg));

    always_comb begin
      unique case (sel)
        BOOTH_P1, BOOTH_P2: ppm = mag;
        BOOTH_M1, BOOTH_M2: ppm = neg;
        default:            ppm = '0;
      endcase
    end

    assign pp[j] = PW'($signed(ppm)) << (2 * j);

    if (j == 0) begin : g_acc0
      assign acc[0] = pp[0];
    end else begin : g_accj
      logic unused_cout;
      sqrt_csla #(.N(PW)) u_add (
        .a(acc[j-1]), .b(pp[j]), .cin(1'b0), .s(acc[j]), .cout(unused_cout)
      );
    end
  end

  assign p = acc[NPP-1];

endmodule
