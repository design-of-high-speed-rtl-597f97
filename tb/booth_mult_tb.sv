// booth_mult_tb: the modified Booth multiplier at three shapes. 8 x 8 is
// tested exhaustively, 17 x 8 (the desensitized filter's pre-added sample
// times coefficient) with corners and random operands, and 6 x 5 (odd
// multiplier width) exhaustively. Products are compared with signed
// integer multiplication.
module booth_mult_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [7:0]  a8, b8;   logic [15:0] p8;
  logic [16:0] a17;      logic [24:0] p17;
  logic [5:0]  a6;       logic [4:0]  b5;   logic [10:0] p6;

  booth_mult #(.AW(8),  .BW(8)) dut8  (.a(a8),  .b(b8), .p(p8));
  booth_mult #(.AW(17), .BW(8)) dut17 (.a(a17), .b(b8), .p(p17));
  booth_mult #(.AW(6),  .BW(5)) dut6  (.a(a6),  .b(b5), .p(p6));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    for (int i = 0; i < 65536; i++) begin
      {a8, b8} = 16'(i);
      a17 = {$urandom} % (1 << 17);
      if (i < 64) a17 = (i % 2 == 0) ? 17'h10000 : 17'h0FFFF;   // extremes
      {a6, b5} = 11'(i);
      #1;
      e = longint'($signed(a8)) * longint'($signed(b8));
      checks++;
      if (p8 !== 16'(e)) begin
        failures++;
        if (failures < 10) $display("8x8 %0d*%0d gave %0d", $signed(a8), $signed(b8), $signed(p8));
      end
      e = longint'($signed(a17)) * longint'($signed(b8));
      checks++;
      if (p17 !== 25'(e)) begin
        failures++;
        if (failures < 10) $display("17x8 %0d*%0d gave %0d", $signed(a17), $signed(b8), $signed(p17));
      end
      if (i < 2048) begin
        e = longint'($signed(a6)) * longint'($signed(b5));
        checks++;
        if (p6 !== 11'(e)) begin
          failures++;
          if (failures < 10) $display("6x5 %0d*%0d gave %0d", $signed(a6), $signed(b5), $signed(p6));
        end
      end
      if (i % 64 == 0) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
