// sqrt_csla_tb: the square-root carry select adder at the four sizes the
// paper compares (8, 16, 32 and 64 bits). Each gets corner cases (carry
// rippling through every group, all ones, carry-in) and random operands;
// {cout, s} is compared with a + b + cin computed in wider integers.
module sqrt_csla_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [63:0] a, b;
  logic        cin;

  logic [7:0]  s8;   logic c8;
  logic [15:0] s16;  logic c16;
  logic [31:0] s32;  logic c32;
  logic [63:0] s64;  logic c64;

  sqrt_csla #(.N(8))  dut8  (.a(a[7:0]),  .b(b[7:0]),  .cin(cin), .s(s8),  .cout(c8));
  sqrt_csla #(.N(16)) dut16 (.a(a[15:0]), .b(b[15:0]), .cin(cin), .s(s16), .cout(c16));
  sqrt_csla #(.N(32)) dut32 (.a(a[31:0]), .b(b[31:0]), .cin(cin), .s(s32), .cout(c32));
  sqrt_csla #(.N(64)) dut64 (.a(a),       .b(b),       .cin(cin), .s(s64), .cout(c64));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    logic [64:0] e;
    @(posedge clk);
    e = {1'b0, a} + {1'b0, b} + 65'(cin);
    checks++;
    if ({c64, s64} !== e) begin
      failures++;
      $display("N=64 %h+%h+%0d gave %h", a, b, cin, {c64, s64});
    end
    e = 65'(a[31:0]) + 65'(b[31:0]) + 65'(cin);
    checks++;
    if ({c32, s32} !== e[32:0]) begin
      failures++;
      $display("N=32 %h+%h+%0d gave %h", a[31:0], b[31:0], cin, {c32, s32});
    end
    e = 65'(a[15:0]) + 65'(b[15:0]) + 65'(cin);
    checks++;
    if ({c16, s16} !== e[16:0]) begin
      failures++;
      $display("N=16 %h+%h+%0d gave %h", a[15:0], b[15:0], cin, {c16, s16});
    end
    e = 65'(a[7:0]) + 65'(b[7:0]) + 65'(cin);
    checks++;
    if ({c8, s8} !== e[8:0]) begin
      failures++;
      $display("N=8 %h+%h+%0d gave %h", a[7:0], b[7:0], cin, {c8, s8});
    end
  endtask

  initial begin
    // full carry ripple, all ones, zero
    a = '1; b = '0; cin = 1'b1; check_all();
    a = '1; b = '1; cin = 1'b1; check_all();
    a = '1; b = '1; cin = 1'b0; check_all();
    a = '0; b = '0; cin = 1'b0; check_all();
    a = 64'h5555_5555_5555_5555; b = 64'hAAAA_AAAA_AAAA_AAAA; cin = 1'b1; check_all();
    // a carry generated in each single bit position
    for (int i = 0; i < 64; i++) begin
      a = 64'(1) << i; b = ~(64'(0)) << i; cin = 1'b0; check_all();
      a = (64'(1) << i) - 1; b = 64'(0); cin = 1'b1; check_all();
    end
    for (int i = 0; i < 4000; i++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      cin = 1'($urandom);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
