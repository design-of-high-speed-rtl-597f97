// fir_top_tb: end-to-end test of the whole design at its default sizes
// (no parameter overrides): the 16-bit desensitized half-band filter and
// the 3-tap 8-bit direct-form filter run at the same time on independent
// random streams with independent gaps, while the sequential 16-bit Booth
// multiplier works through random products started back to back.
//
// Each output is compared with a convolution model of its filter. The test
// counts how often each mechanism occurred and fails if one never did:
// output saturation (ovf), sample holds while in_valid is low (each
// filter), exact rejection of a full-scale tone at half the sample rate,
// the most negative input sample on both filters, and Booth subtract and
// add steps in the sequential multiplier (counted from its operands).
module fir_top_tb;
  localparam logic signed [7:0] DS_H [4] = '{-8'sd2, 8'sd6, -8'sd12, 8'sd40};
  localparam logic signed [7:0] DF_H [3] = '{8'sd32, 8'sd64, 8'sd32};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_sat = 0, n_ds_hold = 0, n_df_hold = 0, n_nyq = 0, n_ds_min = 0, n_df_min = 0;

  logic        rst_n;
  logic        ds_in_valid, ds_out_valid, ds_ovf;
  logic [15:0] ds_x, ds_y;
  logic        df_in_valid, df_out_valid;
  logic [7:0]  df_x;
  logic [17:0] df_y;
  logic        bs_start, bs_busy, bs_done;
  logic [15:0] bs_a, bs_b;
  logic [31:0] bs_p;
  int          n_bs_prod = 0, n_bs_sub = 0, n_bs_add = 0;

  fir_top dut (
    .clk(clk), .rst_n(rst_n),
    .ds_in_valid(ds_in_valid), .ds_x(ds_x),
    .ds_out_valid(ds_out_valid), .ds_y(ds_y), .ds_ovf(ds_ovf),
    .df_in_valid(df_in_valid), .df_x(df_x),
    .df_out_valid(df_out_valid), .df_y(df_y),
    .bs_start(bs_start), .bs_a(bs_a), .bs_b(bs_b),
    .bs_busy(bs_busy), .bs_done(bs_done), .bs_p(bs_p)
  );

  // Sequential multiplier: a new random product whenever it is idle; each
  // result must arrive 16 clocks after its start and be exact.
  int          bs_wait;
  logic [15:0] bs_qa, bs_qb;
  always @(posedge clk) begin
    if (!rst_n) begin
      bs_start <= 1'b0;
      bs_wait  <= 0;
    end else if (bs_start) begin
      bs_start <= 1'b0;
      bs_wait  <= 1;
    end else if (bs_wait > 0) begin
      if (bs_done) begin
        checks += 2;
        // bs_wait is 1 at the start edge and is sampled one edge after
        // done rises, so 16 clocks from start to done read as 17
        if (bs_wait != 17) begin
          failures++;
          $display("booth_seq took %0d clocks", bs_wait);
        end
        if ($signed(bs_p) !== 32'(int'($signed(bs_qa)) * int'($signed(bs_qb)))) begin
          failures++;
          $display("booth_seq %0d*%0d gave %0d", $signed(bs_qa), $signed(bs_qb), $signed(bs_p));
        end
        n_bs_prod++;
        for (int i = 0; i < 16; i++) begin
          if (bs_qb[i] && (i == 0 || !bs_qb[i-1])) n_bs_sub++;
          if (!bs_qb[i] && i > 0 && bs_qb[i-1]) n_bs_add++;
        end
        bs_wait <= 0;
      end else begin
        bs_wait <= bs_wait + 1;
      end
    end else if (!bs_busy) begin
      bs_qa    = 16'($urandom);
      bs_qb    = 16'($urandom);
      bs_a     <= bs_qa;
      bs_b     <= bs_qb;
      bs_start <= 1'b1;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ds_xs[$], df_xs[$];

  function automatic longint dsx(int j);
    return (j < 0) ? 0 : longint'(ds_xs[j]);
  endfunction

  function automatic longint ds_u(int j);
    longint acc = 64 * dsx(j - 8);
    for (int k = 0; k < 4; k++)
      acc += longint'(DS_H[k]) * (dsx(j - 2*k) + dsx(j - 16 + 2*k));
    return acc;
  endfunction

  // One clock: both filters get a sample or idle, then both are checked.
  task automatic cycle(logic dv, logic [15:0] dd, logic fv, logic [7:0] fd);
    longint f, q;
    logic   eo;
    int     e, m;
    ds_in_valid = dv; ds_x = dd;
    df_in_valid = fv; df_x = fd;
    @(posedge clk);
    if (dv) ds_xs.push_back(int'($signed(dd)));
    if (fv) df_xs.push_back(int'($signed(fd)));
    #1;
    checks += 2;
    if (ds_out_valid !== dv) begin failures++; $display("ds_out_valid wrong"); end
    if (df_out_valid !== fv) begin failures++; $display("df_out_valid wrong"); end
    if (dv) begin
      m = ds_xs.size() - 1;
      f = ds_u(m - 1) + 2 * ds_u(m - 2) + ds_u(m - 3);
      q = f >>> 9;
      eo = 1'b0;
      if (q > 32767)       begin q = 32767;  eo = 1'b1; end
      else if (q < -32768) begin q = -32768; eo = 1'b1; end
      checks++;
      if (ds_y !== 16'(q) || ds_ovf !== eo) begin
        failures++;
        $display("desens sample %0d: y=%0d ovf=%0d, expected %0d %0d",
                 m, $signed(ds_y), ds_ovf, q, eo);
      end
      if (ds_ovf) n_sat++;
      if (dd == 16'h8000) n_ds_min++;
    end else n_ds_hold++;
    if (fv) begin
      m = df_xs.size() - 1;
      e = 0;
      for (int k = 0; k < 3; k++) if (m - k >= 0) e += int'(DF_H[k]) * df_xs[m - k];
      checks++;
      if ($signed(df_y) !== 18'(e)) begin
        failures++;
        $display("direct sample %0d: y=%0d, expected %0d", m, $signed(df_y), e);
      end
      if (fd == 8'h80) n_df_min++;
    end else n_df_hold++;
  endtask

  initial begin
    rst_n = 1'b0;
    ds_in_valid = 1'b0; ds_x = '0; df_in_valid = 1'b0; df_x = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // random streams with independent gaps; extremes now and then
    for (int i = 0; i < 3000; i++) begin
      logic [15:0] dd;
      logic [7:0]  fd;
      dd = ($urandom % 50 == 0) ? 16'h8000 : 16'($signed(16'($urandom)) >>> 2);
      fd = ($urandom % 50 == 0) ? 8'h80 : 8'($urandom);
      cycle(1'($urandom % 6 != 0), dd, 1'($urandom % 4 != 0), fd);
    end

    // full-scale tone at fs/2 into the desensitized filter
    for (int i = 0; i < 40; i++) begin
      cycle(1'b1, (i % 2 == 0) ? 16'sd30000 : -16'sd30000, 1'b1, 8'($urandom));
      if (i >= 24) begin
        checks++;
        if (ds_y !== '0) begin failures++; $display("fs/2 tone not rejected"); end
        else n_nyq++;
      end
    end

    // full-scale steps: saturation both ways
    for (int i = 0; i < 25; i++) cycle(1'b1, 16'sh7fff, 1'b1, 8'h7f);
    for (int i = 0; i < 25; i++) cycle(1'b1, 16'sh8000, 1'b1, 8'h80);

    $display("booth_seq products %0d, subtract steps %0d, add steps %0d",
             n_bs_prod, n_bs_sub, n_bs_add);
    $display("saturated %0d, desens holds %0d, direct holds %0d, fs/2 zeros %0d, min inputs %0d/%0d",
             n_sat, n_ds_hold, n_df_hold, n_nyq, n_ds_min, n_df_min);
    checks++;
    if (n_sat == 0 || n_ds_hold == 0 || n_df_hold == 0 || n_nyq == 0 ||
        n_ds_min == 0 || n_df_min == 0 || n_bs_prod == 0 || n_bs_sub == 0 ||
        n_bs_add == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
