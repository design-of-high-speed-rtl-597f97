// fir_direct_tb: 3-tap direct-form filter at its default 8-bit size.
// An impulse must reproduce the coefficients in order; then random signed
// samples (including -128 and 127) with random gaps in in_valid are
// compared with y[m] = sum_k h[k] x[m-k], which appears one clock after
// the edge that takes x[m].
module fir_direct_tb;
  localparam logic signed [7:0] HC [3] = '{8'sd32, 8'sd64, 8'sd32};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        rst_n, in_valid, out_valid;
  logic [7:0]  x;
  logic [17:0] y;

  fir_direct #(.H(HC)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
    .out_valid(out_valid), .y(y)
  );

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xs[$];

  task automatic step(logic v, logic [7:0] d);
    int e;
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
      e = 0;
      for (int k = 0; k < 3; k++)
        if (xs.size() - 1 - k >= 0) e += int'(HC[k]) * xs[xs.size() - 1 - k];
      checks++;
      if ($signed(y) !== 18'(e)) begin
        failures++;
        $display("sample %0d: y=%0d, expected %0d", xs.size() - 1, $signed(y), e);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; x = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    step(1'b1, 8'd1);
    checks++;
    if ($signed(y) != 32) begin failures++; $display("impulse tap 0: %0d", $signed(y)); end
    step(1'b1, 8'd0);
    checks++;
    if ($signed(y) != 64) begin failures++; $display("impulse tap 1: %0d", $signed(y)); end
    step(1'b1, 8'd0);
    checks++;
    if ($signed(y) != 32) begin failures++; $display("impulse tap 2: %0d", $signed(y)); end
    step(1'b1, 8'h80); step(1'b1, 8'h80); step(1'b1, 8'h80);
    step(1'b1, 8'h7f); step(1'b1, 8'h7f); step(1'b1, 8'h7f);
    for (int i = 0; i < 3000; i++) begin
      if ($urandom % 4 == 0) step(1'b0, 8'($urandom));
      step(1'b1, 8'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
