// desens_fir: desensitized half-band FIR filter, 16-bit in and out.
//
// Structure (transfer function written in z):
//   u(z) = 1/2 z^-(2NH) + sum_k H[k] (z^-2k + z^-(4NH-2k)),  k = 0..NH-1
//   Y(z) = z^-1 (1 + z^-1)^2 u(z) X(z) / 2^(COEF_FRAC+2)
// A forward chain of NH double delays (z^-2) carries the input to the
// centre tap; a second chain of NH double delays carries it back, so tap
// k of the forward chain and tap k of the returning chain hold samples
// that share coefficient H[k]. They are added first (folded symmetric
// pre-adders), so only NH multipliers are needed. Each product is added
// into a multiply-accumulate row (mac_unit: modified Booth multiplier and
// square-root carry select adder). The row's sum is registered and passed
// through a 1 + z^-1 section. The centre tap takes a 1 + z^-1 section,
// the weight 1/2 and a register. The two paths are added and the result
// passes through a last 1 + z^-1 section. The (1 + z^-1) factors place
// zeros at half the sample rate and lower the response's sensitivity to
// coefficient rounding.
//
// From the paper: the two delay chains of z^-2, the four coefficients
// H0..H3 with pre-adders, the registers and the three 1 + z^-1 sections,
// the 16-bit input and output, 8-bit coefficients, the 1/2 weight of the
// centre term, and modified Booth / carry-select arithmetic. This design's
// own choices: the coefficient values (the paper prints none), the Q1.7
// coefficient format (1/2 is 64), full-precision internal widths, the
// output scaling by 2^-(COEF_FRAC+2) (floor) with saturation to OUT_W
// bits, the output register, the clock enable and the asynchronous
// active-low reset.
//
// Interface and timing: one sample x is taken on each clock edge with
// in_valid high; all registers hold while in_valid is low. out_valid
// follows in_valid by one clock. The y that appears with the sample x[m]
// is sum_j g[j] x[m-j], where g is the impulse response above; its first
// tap has delay 1. ovf is high with a y that was saturated.
module desens_fir #(
  parameter int unsigned DATA_W    = 16,
  parameter int unsigned COEF_W    = 8,
  parameter int unsigned COEF_FRAC = 7,
  parameter int unsigned OUT_W     = 16,
  parameter int unsigned NH        = 4,
  parameter logic signed [COEF_W-1:0] H [NH] = '{-8'sd2, 8'sd6, -8'sd12, 8'sd40}
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] x,
  output logic              out_valid,
  output logic [OUT_W-1:0]  y,
  output logic              ovf
);

  localparam int unsigned NDL  = 4 * NH;                 // delay-line length
  localparam int unsigned PW   = DATA_W + 1;             // pre-adder sum
  localparam int unsigned SW   = PW + COEF_W + $clog2(NH); // MAC row sum
  localparam int unsigned CWID = DATA_W + COEF_FRAC - 1; // centre x * 1/2
  localparam int unsigned TW   = SW + 2;                 // both paths added
  localparam int unsigned YW   = TW + 1;                 // after last 1+z^-1
  localparam int unsigned SH   = COEF_FRAC + 2;          // output scaling

  // Delay line: tap[i] = x[n-i]; tap[0] is the present input.
  logic [DATA_W-1:0] tap [NDL+1];
  logic [DATA_W-1:0] dly [1:NDL];

  assign tap[0] = x;
  for (genvar i = 1; i <= NDL; i++) begin : g_tap
    assign tap[i] = dly[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= NDL; i++) dly[i] <= '0;
    end else if (in_valid) begin
      dly[1] <= x;
      for (int i = 2; i <= NDL; i++) dly[i] <= dly[i-1];
    end
  end

  // Folded taps, pre-adders and the multiply-accumulate row.
  logic [SW-1:0] row [NH+1];
  assign row[0] = '0;

  for (genvar k = 0; k < NH; k++) begin : g_mac
    logic [PW-1:0] pre;
    logic          unused_cout;
    sqrt_csla #(.N(PW)) u_pre (
      .a({tap[2*k][DATA_W-1], tap[2*k]}),
      .b({tap[NDL-2*k][DATA_W-1], tap[NDL-2*k]}),
      .cin(1'b0), .s(pre), .cout(unused_cout)
    );
    mac_unit #(.AW(PW), .BW(COEF_W), .CW(SW)) u_mac (
      .a(pre), .b(H[k]), .c(row[k]), .y(row[k+1])
    );
  end

  // Sum path: Reg, then 1 + z^-1.
  logic [SW-1:0] sum_q;
  logic [SW:0]   sum_f;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sum_q <= '0;
    else if (in_valid) sum_q <= row[NH];
  end

  one_plus_zinv #(.W(SW)) u_sum_d (
    .clk(clk), .rst_n(rst_n), .en(in_valid), .x(sum_q), .y(sum_f)
  );

  // Centre path: 1 + z^-1, weight 1/2 (shift by COEF_FRAC-1), then Reg.
  logic [DATA_W:0] ctr_f;
  logic [CWID:0]   ctr_q;

  one_plus_zinv #(.W(DATA_W)) u_ctr_d (
    .clk(clk), .rst_n(rst_n), .en(in_valid), .x(tap[2*NH]), .y(ctr_f)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        ctr_q <= '0;
    else if (in_valid) ctr_q <= {ctr_f, {(COEF_FRAC-1){1'b0}}};
  end

  // Add both paths, then the last 1 + z^-1.
  logic [TW-1:0] t;
  logic [YW-1:0] yf;
  logic          unused_tcout;

  sqrt_csla #(.N(TW)) u_join (
    .a(TW'($signed(sum_f))), .b(TW'($signed(ctr_q))), .cin(1'b0),
    .s(t), .cout(unused_tcout)
  );

  one_plus_zinv #(.W(TW)) u_out_d (
    .clk(clk), .rst_n(rst_n), .en(in_valid), .x(t), .y(yf)
  );

  // Scale, saturate and register the output.
  localparam logic signed [YW-SH-1:0] YMAX = (YW-SH)'((2**(OUT_W-1)) - 1);
  localparam logic signed [YW-SH-1:0] YMIN = -YMAX - 1;
  logic signed [YW-SH-1:0] ys;
  logic [OUT_W-1:0]        y_n;
  logic                    ovf_n;
  logic                    unused_frac;   // bits below the output scale

  assign unused_frac = ^yf[SH-1:0];

  always_comb begin
    ys = $signed(yf[YW-1:SH]);
    if (ys > YMAX) begin
      y_n   = {1'b0, {(OUT_W-1){1'b1}}};
      ovf_n = 1'b1;
    end else if (ys < YMIN) begin
      y_n   = {1'b1, {(OUT_W-1){1'b0}}};
      ovf_n = 1'b1;
    end else begin
      y_n   = ys[OUT_W-1:0];
      ovf_n = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y         <= '0;
      ovf       <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        y   <= y_n;
        ovf <= ovf_n;
      end
    end
  end

endmodule
