// fir_direct: direct-form FIR filter, y[n] = sum_k h[k] x[n-k].
//
// TAPS-1 registers hold the past samples; the present sample and the
// delayed ones feed a row of multiply-accumulate units (mac_unit: modified
// Booth multiplier plus square-root carry select adder), one per
// coefficient, whose running sum is the filter output. The result is kept
// at full precision (DATA_W + COEF_W + clog2(TAPS) bits), so it cannot
// overflow.
//
// The paper gives the structure, 3 taps, 8-bit samples and 8-bit fixed
// coefficients. The coefficient values (a small low-pass, 1/4 1/2 1/4 in
// Q1.7), the output register, the clock enable and the asynchronous
// active-low reset are this design's choices.
//
// Timing: a sample is taken on each clock edge with in_valid high and the
// y for that sample, including it, appears on the same edge; out_valid
// follows in_valid by one clock. Registers hold while in_valid is low.
module fir_direct #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned COEF_W = 8,
  parameter int unsigned TAPS   = 3,
  parameter logic signed [COEF_W-1:0] H [TAPS] = '{8'sd32, 8'sd64, 8'sd32},
  parameter int unsigned OUT_W  = DATA_W + COEF_W + $clog2(TAPS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] x,
  output logic              out_valid,
  output logic [OUT_W-1:0]  y
);

  logic [DATA_W-1:0] tap [TAPS];
  logic [DATA_W-1:0] dly [1:TAPS-1];

  assign tap[0] = x;
  for (genvar i = 1; i < TAPS; i++) begin : g_tap
    assign tap[i] = dly[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i < TAPS; i++) dly[i] <= '0;
    end else if (in_valid) begin
      dly[1] <= x;
      for (int i = 2; i < TAPS; i++) dly[i] <= dly[i-1];
    end
  end

  logic [OUT_W-1:0] row [TAPS+1];
  assign row[0] = '0;

  for (genvar k = 0; k < TAPS; k++) begin : g_mac
    mac_unit #(.AW(DATA_W), .BW(COEF_W), .CW(OUT_W)) u_mac (
      .a(tap[k]), .b(H[k]), .c(row[k]), .y(row[k+1])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= row[TAPS];
    end
  end

endmodule
