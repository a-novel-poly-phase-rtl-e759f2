// mac_cell_tb: checks the poly-phase MAC cell.
//
// Part 1 replays the reference MAC example: even samples 5.5, 10.5, 15.5,
// 13.5 and odd samples 5.5, 12.5, 12.75, 11 (2 fractional bits), even
// coefficients 1.5, 1.5, 0.5, 1.5 and odd coefficients 1.5, 1.5, 1.5, 0.5
// (1 fractional bit) must give 16.5, 34.5, 26.875, 25.75 (3 fractional
// bits, words 132, 276, 215, 206), one result per clock, one clock after
// the operands. Part 2 checks random signed operands with a random
// incoming partial sum at the default widths, for both multiplier styles.
module mac_cell_tb;
  localparam int DW1 = 8, CW1 = 4, AW1 = 14;
  localparam int DW = dwt_pkg::DW, CW = dwt_pkg::CW;
  localparam int AW = dwt_pkg::acc_width(DW, CW, 2);

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // Part 1 instance, widths of the example.
  logic signed [DW1-1:0] e1, o1;
  logic signed [CW1-1:0] ce1, co1;
  logic signed [AW1-1:0] acc1, y1;
  mac_cell #(.DW(DW1), .CW(CW1), .AW(AW1)) dut1 (
    .clk, .rst, .x_even(e1), .x_odd(o1), .c_even(ce1), .c_odd(co1), .acc_in(acc1), .acc_out(y1)
  );

  // Part 2 instance, default widths.
  logic signed [DW-1:0] e2, o2;
  logic signed [CW-1:0] ce2, co2;
  logic signed [AW-1:0] acc2, y2;
  mac_cell #(.DW(DW), .CW(CW), .AW(AW)) dut2 (
    .clk, .rst, .x_even(e2), .x_odd(o2), .c_even(ce2), .c_odd(co2), .acc_in(acc2), .acc_out(y2)
  );

  // Same operands, multipliers left to synthesis: results must be identical.
  logic signed [AW-1:0] y3;
  mac_cell #(.DW(DW), .CW(CW), .AW(AW), .ARRAY_MULT(1'b0)) dut3 (
    .clk, .rst, .x_even(e2), .x_odd(o2), .c_even(ce2), .c_odd(co2), .acc_in(acc2), .acc_out(y3)
  );

  // Example values scaled to integers: samples *4, coefficients *2.
  int ie[4] = '{22, 42, 62, 54};
  int io[4] = '{22, 50, 51, 44};
  int he[4] = '{3, 3, 1, 3};
  int ho[4] = '{3, 3, 3, 1};
  int exp1[4] = '{132, 276, 215, 206};

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {e1, o1, ce1, co1, acc1} = '0;
    {e2, o2, ce2, co2, acc2} = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    checks++;
    if (y1 != 0) begin failures++; $display("FAIL reset value %0d", y1); end

    // Part 1: one operand set per clock, result one clock later.
    for (int t = 0; t < 5; t++) begin
      if (t < 4) begin
        e1  <= DW1'(ie[t]);  o1  <= DW1'(io[t]);
        ce1 <= CW1'(he[t]);  co1 <= CW1'(ho[t]);
        acc1 <= '0;
      end
      @(posedge clk);
      #1;
      if (t < 4) begin
        checks++;
        if (int'(y1) != exp1[t]) begin
          failures++;
          $display("FAIL example %0d: got %0d (%f) expected %0d", t, y1, real'(y1) / 8.0, exp1[t]);
        end else
          $display("example %0d: %f", t, real'(y1) / 8.0);
      end
    end

    // Part 2: random operands.
    for (int t = 0; t < 500; t++) begin
      longint ex;
      logic signed [DW-1:0] re, ro;
      logic signed [CW-1:0] rce, rco;
      logic signed [AW-1:0] racc;
      re = DW'($urandom); ro = DW'($urandom);
      rce = CW'($urandom); rco = CW'($urandom);
      racc = AW'($signed($urandom) >>> 2);
      e2 <= re; o2 <= ro; ce2 <= rce; co2 <= rco; acc2 <= racc;
      ex = longint'(re) * longint'(rce) + longint'(ro) * longint'(rco) + longint'(racc);
      @(posedge clk);
      #1;
      checks++;
      if (longint'(y2) != ex) begin
        failures++;
        if (failures < 10) $display("FAIL random %0d: got %0d expected %0d", t, y2, ex);
      end
      checks++;
      if (longint'(y3) != ex) begin
        failures++;
        if (failures < 10) $display("FAIL random %0d (operator multipliers): got %0d", t, y3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
