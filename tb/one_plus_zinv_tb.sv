// one_plus_zinv_tb: the 1 + z^-1 section at 16 bits. Random signed samples
// are fed with a random enable; y must equal the present sample plus the
// last sample that was taken with en high (0 after reset), in 17 bits.
module one_plus_zinv_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        rst_n, en;
  logic [15:0] x;
  logic [16:0] y;

  one_plus_zinv #(.W(16)) dut (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev;
    rst_n = 1'b0; en = 1'b0; x = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    prev = 0;
    for (int i = 0; i < 4000; i++) begin
      x  = (i < 4) ? 16'h8000 : 16'($urandom);
      en = (i < 8) ? 1'b1 : 1'($urandom % 4 != 0);
      #1;
      checks++;
      if ($signed(y) !== 17'(int'($signed(x)) + prev)) begin
        failures++;
        $display("x=%0d prev=%0d gave %0d", $signed(x), prev, $signed(y));
      end
      @(posedge clk);
      if (en) prev = int'($signed(x));
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
