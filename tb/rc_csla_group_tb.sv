// rc_csla_group_tb: exhaustive test of the reduced-complexity adder group.
// Every a, b and carry-in of a 4-bit and a 3-bit group is applied and the
// sum and carry out are compared with integer addition.
module rc_csla_group_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0] a4, b4, s4;
  logic [2:0] a3, b3, s3;
  logic       cin, co4, co3;

  rc_csla_group #(.W(4)) dut4 (.a(a4), .b(b4), .cin(cin), .s(s4), .cout(co4));
  rc_csla_group #(.W(3)) dut3 (.a(a3), .b(b3), .cin(cin), .s(s3), .cout(co3));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, a4, b4} = 9'(i);
      a3 = a4[2:0];
      b3 = b4[2:0];
      @(posedge clk);
      checks++;
      if ({co4, s4} !== 5'(a4 + b4 + cin)) begin
        failures++;
        $display("W=4 %0d+%0d+%0d gave %0d", a4, b4, cin, {co4, s4});
      end
      checks++;
      if ({co3, s3} !== 4'(a3 + b3 + cin)) begin
        failures++;
        $display("W=3 %0d+%0d+%0d gave %0d", a3, b3, cin, {co3, s3});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
