// desens_fir_tb: desensitized half-band filter at its default 16-bit size.
//
// The reference is a plain convolution written from the transfer function
//   u[j] = 64 x[j-8] + sum_k H[k] (x[j-2k] + x[j-16+2k])
//   y[m] = sat16( floor( (u[m-1] + 2 u[m-2] + u[m-3]) / 2^9 ) )
// so the folded taps, the three 1 + z^-1 sections, the register stages and
// the one-clock output delay are all checked against it. Phases: an
// impulse (response length and delay), random samples with gaps in
// in_valid, a full-scale alternating sequence (must settle to exactly 0:
// the (1 + z^-1)^2 factor has a double zero at half the sample rate), and
// full-scale steps that must saturate and raise ovf.
module desens_fir_tb;
  localparam logic signed [7:0] HC [4] = '{-8'sd2, 8'sd6, -8'sd12, 8'sd40};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_gap = 0, n_sat = 0, n_nyq = 0;

  logic        rst_n, in_valid, out_valid, ovf;
  logic [15:0] x, y;

  desens_fir #(.H(HC)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
    .out_valid(out_valid), .y(y), .ovf(ovf)
  );

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // accepted samples, newest last
  int xs[$];

  function automatic longint xh(int j);
    return (j < 0) ? 0 : longint'(xs[j]);
  endfunction

  function automatic longint u(int j);
    longint acc = 64 * xh(j - 8);
    for (int k = 0; k < 4; k++)
      acc += longint'(HC[k]) * (xh(j - 2*k) + xh(j - 16 + 2*k));
    return acc;
  endfunction

  logic        exp_ovf;
  logic [15:0] exp_y;

  task automatic expect_y(int m);
    longint f, q;
    f = u(m - 1) + 2 * u(m - 2) + u(m - 3);
    q = f >>> 9;
    exp_ovf = 1'b0;
    if (q > 32767)       begin q = 32767;  exp_ovf = 1'b1; end
    else if (q < -32768) begin q = -32768; exp_ovf = 1'b1; end
    exp_y = 16'(q);
  endtask

  // one sample (or an idle cycle when v == 0)
  task automatic step(logic v, logic [15:0] d);
    in_valid = v;
    x = d;
    @(posedge clk);
    if (v) xs.push_back(int'($signed(d)));
    #1;
    checks++;
    if (out_valid !== v) begin
      failures++;
      $display("out_valid %0d, expected %0d", out_valid, v);
    end
    if (v) begin
      expect_y(xs.size() - 1);
      checks++;
      if (y !== exp_y || ovf !== exp_ovf) begin
        failures++;
        $display("sample %0d: y=%0d ovf=%0d, expected %0d %0d",
                 xs.size() - 1, $signed(y), ovf, $signed(exp_y), exp_ovf);
      end
      if (ovf) n_sat++;
    end else begin
      n_gap++;
    end
  endtask

  initial begin
    int first_nz, last_nz;
    rst_n = 1'b0; in_valid = 1'b0; x = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // impulse: the response must start one sample late and last 19 samples
    first_nz = -1; last_nz = -1;
    step(1'b1, 16'd16384);
    for (int i = 1; i < 30; i++) begin
      step(1'b1, 16'd0);
      if (y != 0) begin
        if (first_nz < 0) first_nz = i;
        last_nz = i;
      end
    end
    checks++;
    if (first_nz != 1 || last_nz != 19) begin
      failures++;
      $display("impulse response spans %0d..%0d, expected 1..19", first_nz, last_nz);
    end

    // random samples with random gaps
    for (int i = 0; i < 2000; i++) begin
      if ($urandom % 5 == 0) step(1'b0, 16'($urandom));
      step(1'b1, 16'($signed(16'($urandom)) >>> 2));
    end

    // full-scale tone at half the sample rate
    for (int i = 0; i < 40; i++) begin
      step(1'b1, (i % 2 == 0) ? 16'sd20000 : -16'sd20000);
      if (i >= 24) begin
        checks++;
        if (y !== '0) begin
          failures++;
          $display("tone at fs/2 not rejected: y=%0d", $signed(y));
        end else n_nyq++;
      end
    end

    // full-scale steps: positive and negative saturation
    for (int i = 0; i < 30; i++) step(1'b1, 16'sh7fff);
    for (int i = 0; i < 30; i++) step(1'b1, 16'sh8000);

    checks++;
    if (n_sat == 0 || n_gap == 0 || n_nyq == 0) begin
      failures++;
      $display("not exercised: saturation %0d, gaps %0d, fs/2 zero %0d", n_sat, n_gap, n_nyq);
    end
    $display("saturated outputs %0d, idle cycles %0d, fs/2 zero outputs %0d", n_sat, n_gap, n_nyq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
