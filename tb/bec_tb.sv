// bec_tb: exhaustive test of the binary to excess-1 converter for 4- and
// 5-bit words with both incoming carries: {xc, x} must equal {bc, b} + 1
// with the carry of the +1 ORed into xc.
module bec_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0] b4, x4;
  logic [4:0] b5, x5;
  logic       bc, xc4, xc5;

  bec #(.W(4)) dut4 (.b(b4), .bc(bc), .x(x4), .xc(xc4));
  bec #(.W(5)) dut5 (.b(b5), .bc(bc), .x(x5), .xc(xc5));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] e5;
    logic [4:0] e4;
    for (int i = 0; i < 64; i++) begin
      {bc, b5} = 6'(i);
      b4 = b5[3:0];
      @(posedge clk);
      e4 = 5'(b4) + 5'd1;
      e5 = 6'(b5) + 6'd1;
      checks++;
      if (x4 !== e4[3:0] || xc4 !== (bc | e4[4])) begin
        failures++;
        $display("W=4 b=%0d bc=%0d gave x=%0d xc=%0d", b4, bc, x4, xc4);
      end
      checks++;
      if (x5 !== e5[4:0] || xc5 !== (bc | e5[5])) begin
        failures++;
        $display("W=5 b=%0d bc=%0d gave x=%0d xc=%0d", b5, bc, x5, xc5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
