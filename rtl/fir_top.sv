// fir_top: the two filters of the design and the sequential Booth
// multiplier, side by side.
//
// desens_fir is the 16-bit desensitized half-band filter (folded symmetric
// taps, four coefficients, three 1 + z^-1 sections); fir_direct is the
// 3-tap, 8-bit direct-form filter. Both build their multipliers from the
// radix-4 modified Booth multiplier and all their adders from the
// square-root carry select adder. booth_seq is the add/subtract-and-shift
// Booth multiplier of the flowchart, brought out on its own ports. The
// three share clock and reset and nothing else. Timing is that of each
// unit: one clock from an accepted sample to a filter output, BS_N clocks
// from start to done for the multiplier.
module fir_top #(
  parameter int unsigned DS_DATA_W = 16,
  parameter int unsigned DS_OUT_W  = 16,
  parameter int unsigned DF_DATA_W = 8,
  parameter int unsigned DF_TAPS   = 3,
  parameter int unsigned DF_OUT_W  = DF_DATA_W + 8 + $clog2(DF_TAPS),
  parameter int unsigned BS_N      = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // desensitized half-band filter
  input  logic                 ds_in_valid,
  input  logic [DS_DATA_W-1:0] ds_x,
  output logic                 ds_out_valid,
  output logic [DS_OUT_W-1:0]  ds_y,
  output logic                 ds_ovf,
  // direct-form filter
  input  logic                 df_in_valid,
  input  logic [DF_DATA_W-1:0] df_x,
  output logic                 df_out_valid,
  output logic [DF_OUT_W-1:0]  df_y,
  // sequential Booth multiplier
  input  logic                 bs_start,
  input  logic [BS_N-1:0]      bs_a,
  input  logic [BS_N-1:0]      bs_b,
  output logic                 bs_busy,
  output logic                 bs_done,
  output logic [2*BS_N-1:0]    bs_p
);

  desens_fir #(.DATA_W(DS_DATA_W), .OUT_W(DS_OUT_W)) u_desens (
    .clk(clk), .rst_n(rst_n),
    .in_valid(ds_in_valid), .x(ds_x),
    .out_valid(ds_out_valid), .y(ds_y), .ovf(ds_ovf)
  );

  fir_direct #(.DATA_W(DF_DATA_W), .TAPS(DF_TAPS), .OUT_W(DF_OUT_W)) u_direct (
    .clk(clk), .rst_n(rst_n),
    .in_valid(df_in_valid), .x(df_x),
    .out_valid(df_out_valid), .y(df_y)
  );

  booth_seq #(.N(BS_N)) u_booth_seq (
    .clk(clk), .rst_n(rst_n),
    .start(bs_start), .a(bs_a), .b(bs_b),
    .busy(bs_busy), .done(bs_done), .p(bs_p)
  );

endmodule
