// csel_adder_tb: checks the carry-select adder at two shapes: 34 bits in
// blocks of 4 (the MAC's shape, last block shorter) and 10 bits in blocks
// of 3. Random operands plus the carry-chain corner cases (all ones plus
// one, all ones plus all ones) must give a + b + cin and the carry out.
module csel_adder_tb;
  localparam int W1 = 34, W2 = 10;

  int checks = 0, failures = 0;

  logic [W1-1:0] a1, b1, s1;
  logic          ci1, co1;
  logic [W2-1:0] a2, b2, s2;
  logic          ci2, co2;

  csel_adder #(.W(W1), .BLK(4)) dut1 (.a(a1), .b(b1), .cin(ci1), .sum(s1), .cout(co1));
  csel_adder #(.W(W2), .BLK(3)) dut2 (.a(a2), .b(b2), .cin(ci2), .sum(s2), .cout(co2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check1(input logic [W1-1:0] a, input logic [W1-1:0] b, input logic ci);
    logic [W1:0] e;
    a1 = a; b1 = b; ci1 = ci;
    #1;
    e = {1'b0, a} + {1'b0, b} + (W1+1)'(ci);
    checks++;
    if ({co1, s1} != e) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h + %b = %b%h expected %h", a, b, ci, co1, s1, e);
    end
  endtask

  task automatic check2(input logic [W2-1:0] a, input logic [W2-1:0] b, input logic ci);
    logic [W2:0] e;
    a2 = a; b2 = b; ci2 = ci;
    #1;
    e = {1'b0, a} + {1'b0, b} + (W2+1)'(ci);
    checks++;
    if ({co2, s2} != e) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h + %b = %b%h expected %h", a, b, ci, co2, s2, e);
    end
  endtask

  initial begin
    check1('1, '0, 1'b1);
    check1('1, W1'(1), 1'b0);
    check1('1, '1, 1'b1);
    check1('0, '0, 1'b0);
    for (int t = 0; t < 2000; t++)
      check1({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    for (int a = 0; a < 1024; a += 7)
      for (int b = 0; b < 1024; b += 13)
        check2(W2'(a), W2'(b), 1'(a ^ b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
