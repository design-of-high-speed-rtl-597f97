// mac_unit_tb: multiply-accumulate at its default shape (16-bit data,
// 8-bit coefficient, 26-bit accumulator) with extreme and random operands;
// y must equal c + a*b modulo 2^26.
module mac_unit_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [15:0] a;
  logic [7:0]  b;
  logic [25:0] c, y;

  mac_unit dut (.a(a), .b(b), .c(c), .y(y));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint e;
    @(posedge clk);
    e = longint'($signed(c)) + longint'($signed(a)) * longint'($signed(b));
    checks++;
    if (y !== 26'(e)) begin
      failures++;
      $display("%0d + %0d*%0d gave %0d", $signed(c), $signed(a), $signed(b), $signed(y));
    end
  endtask

  initial begin
    a = 16'h8000; b = 8'h80; c = '0;          check();
    a = 16'h8000; b = 8'h7F; c = 26'h2000000; check();
    a = 16'h7FFF; b = 8'h80; c = 26'h1FFFFFF; check();
    a = 16'hFFFF; b = 8'hFF; c = '1;          check();
    for (int i = 0; i < 5000; i++) begin
      a = 16'($urandom);
      b = 8'($urandom);
      c = 26'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
