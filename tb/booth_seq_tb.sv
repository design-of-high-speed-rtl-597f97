// booth_seq_tb: sequential Booth multiplier at 16 bits and at 4 bits.
// The 4-bit unit is tested on all 256 operand pairs, the 16-bit unit on
// extremes and random pairs. Each product is compared with signed integer
// multiplication, and the time from start to done must be N clocks with
// busy high throughout.
module booth_seq_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        rst_n;
  logic        st16, busy16, done16;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  logic        st4, busy4, done4;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;

  booth_seq #(.N(16)) dut16 (.clk(clk), .rst_n(rst_n), .start(st16), .a(a16), .b(b16),
                             .busy(busy16), .done(done16), .p(p16));
  booth_seq #(.N(4))  dut4  (.clk(clk), .rst_n(rst_n), .start(st4), .a(a4), .b(b4),
                             .busy(busy4), .done(done4), .p(p4));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic mul16(logic [15:0] x, logic [15:0] y);
    int n;
    a16 = x; b16 = y; st16 = 1'b1;
    @(posedge clk); #1 st16 = 1'b0;
    n = 0;
    while (!done16 && n < 100) begin
      checks++;
      if (!busy16) begin failures++; $display("busy low before done"); end
      @(posedge clk); #1 n++;
    end
    checks += 2;
    if (n != 16) begin failures++; $display("N=16 took %0d clocks, expected 16", n); end
    if ($signed(p16) !== 32'(int'($signed(x)) * int'($signed(y)))) begin
      failures++;
      $display("N=16 %0d*%0d gave %0d", $signed(x), $signed(y), $signed(p16));
    end
  endtask

  task automatic mul4(logic [3:0] x, logic [3:0] y);
    int n;
    a4 = x; b4 = y; st4 = 1'b1;
    @(posedge clk); #1 st4 = 1'b0;
    n = 0;
    while (!done4 && n < 100) begin
      @(posedge clk); #1 n++;
    end
    checks += 2;
    if (n != 4) begin failures++; $display("N=4 took %0d clocks, expected 4", n); end
    if ($signed(p4) !== 8'(int'($signed(x)) * int'($signed(y)))) begin
      failures++;
      $display("N=4 %0d*%0d gave %0d", $signed(x), $signed(y), $signed(p4));
    end
  endtask

  initial begin
    rst_n = 1'b0; st16 = 1'b0; st4 = 1'b0; a16 = '0; b16 = '0; a4 = '0; b4 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    for (int i = 0; i < 256; i++) mul4(4'(i >> 4), 4'(i));
    mul16(16'h8000, 16'h8000);
    mul16(16'h8000, 16'h7fff);
    mul16(16'h7fff, 16'h8000);
    mul16(16'hffff, 16'h0001);
    mul16(16'h0000, 16'h1234);
    for (int i = 0; i < 500; i++) mul16(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
