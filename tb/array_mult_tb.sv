// array_mult_tb: checks the signed array multiplier at the MAC's default
// shape (16 x 16 bits) and a small shape (5 x 3 bits, checked
// exhaustively). Products must equal the signed product of the operands,
// including the most negative operands.
module array_mult_tb;
  int checks = 0, failures = 0;

  logic signed [15:0] a1, b1;
  logic signed [31:0] p1;
  logic signed [4:0]  a2;
  logic signed [2:0]  b2;
  logic signed [7:0]  p2;

  array_mult #(.AW(16), .BW(16)) dut1 (.a(a1), .b(b1), .p(p1));
  array_mult #(.AW(5), .BW(3)) dut2 (.a(a2), .b(b2), .p(p2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check1(input logic signed [15:0] a, input logic signed [15:0] b);
    longint e;
    a1 = a; b1 = b;
    #1;
    e = longint'(a) * longint'(b);
    checks++;
    if (longint'(p1) != e) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d = %0d expected %0d", a, b, p1, e);
    end
  endtask

  initial begin
    check1(-16'sd32768, -16'sd32768);
    check1(-16'sd32768, 16'sd32767);
    check1(16'sd32767, 16'sd32767);
    check1(16'sd104 * 16, 16'sd11585);
    for (int t = 0; t < 2000; t++) check1(16'($urandom), 16'($urandom));
    for (int a = -16; a < 16; a++)
      for (int b = -4; b < 4; b++) begin
        a2 = 5'(a); b2 = 3'(b);
        #1;
        checks++;
        if (int'(p2) != a * b) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d", a, b, p2);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
