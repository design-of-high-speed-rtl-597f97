// twos_comp_tb: exhaustive test of the conversion-signal two's
// complementer at 8 and 10 bits against integer negation.
module twos_comp_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [7:0] a8, y8;
  logic [9:0] a10, y10;

  twos_comp #(.W(8))  dut8  (.a(a8),  .y(y8));
  twos_comp #(.W(10)) dut10 (.a(a10), .y(y10));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      a10 = 10'(i);
      a8  = 8'(i);
      @(posedge clk);
      checks++;
      if (y10 !== 10'(-i)) begin
        failures++;
        $display("W=10 -%0d gave %0d", a10, y10);
      end
      if (i < 256) begin
        checks++;
        if (y8 !== 8'(-i)) begin
          failures++;
          $display("W=8 -%0d gave %0d", a8, y8);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
