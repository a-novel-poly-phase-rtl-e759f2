// mac_network_tb: checks a 6-tap MAC-cell network (three cells, so the
// input skew registers and the partial-sum chain are both exercised).
// Random windows arrive with random gaps; each output must equal
// sum_m COEF[2m]*x_odd[m] + COEF[2m+1]*x_even[m] computed here, and must
// appear exactly L/2 = 3 cycles after its window.
module mac_network_tb;
  localparam int DW = 16, CW = 16, L = 6, NC = L / 2;
  localparam int AW = dwt_pkg::acc_width(DW, CW, L);
  localparam logic [L-1:0][CW-1:0] COEF =
    {16'sd2000, -16'sd11000, 16'sd7000, 16'sd5000, -16'sd3000, 16'sd1000};

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic                   in_valid = 0, out_valid;
  logic [NC-1:0][DW-1:0]  xe = '0, xo = '0;
  logic signed [AW-1:0]   y;

  mac_network #(.DW(DW), .CW(CW), .L(L), .AW(AW), .COEF(COEF)) dut (
    .clk, .rst, .in_valid, .x_even(xe), .x_odd(xo), .out_valid, .y
  );

  longint exp_q[$];
  int     tim_q[$];
  int     nout = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor.
  always @(posedge clk) begin
    if (!rst && out_valid) begin
      longint e;
      int t;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %0d", y);
      end else begin
        e = exp_q.pop_front();
        t = tim_q.pop_front();
        if (longint'(y) != e) begin
          failures++;
          if (failures < 30) $display("FAIL got %0d expected %0d", y, e);
        end
        checks++;
        if (cycle - t != NC) begin
          failures++;
          $display("FAIL latency %0d expected %0d", cycle - t, NC);
        end
      end
      nout++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 9) < 7);
      for (int m = 0; m < NC; m++) begin
        xe[m] = DW'($urandom);
        xo[m] = DW'($urandom);
      end
      if (in_valid) begin
        longint s;
        s = 0;
        for (int m = 0; m < NC; m++)
          s += longint'(signed'(CW'(COEF[2*m]))) * longint'(signed'(xo[m]))
             + longint'(signed'(CW'(COEF[2*m+1]))) * longint'(signed'(xe[m]));
        exp_q.push_back(s);
        tim_q.push_back(cycle);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (NC + 3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || nout < 500) begin
      failures++;
      $display("FAIL %0d outputs missing, %0d seen", exp_q.size(), nout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
