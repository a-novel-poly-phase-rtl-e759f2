// dwt_top_full_tb: the DWT with every parameter at its default (8-sample
// frames of 8-bit samples, 2-level Haar transform).
//
// 1. One frame, 104 105 103 104 46 119 97 118. The level-1 and level-2
//    coefficients must equal the integer reference word for word and the
//    published real-valued results to within the rounding of the 16-bit
//    words (1/16 at level 1, 2/16 at level 2):
//      a1 = 147.7839 146.3697 116.6715 152.0265
//      d1 =  -0.7071  -0.7071 -51.6183 -14.8491
//      a2 = 207.9960 189.9964            d2 = 0.99998 -24.9995
//    The frame must enter in N/2 = 4 clocks.
// 2. A 1000-sample signal (two sines plus noise, 8-bit signed), sent as 125
//    back-to-back frames: all outputs must match the reference, and the
//    whole signal must enter in 500 clocks.
module dwt_top_full_tb;
  import dwt_ref_pkg::*;
  localparam int XW = dwt_pkg::XW, N = dwt_pkg::FRAME, DW = dwt_pkg::DW;
  localparam int CW = dwt_pkg::CW, CF = dwt_pkg::CF;
  localparam int NSIG = 1000;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic                 load = 0, ready;
  logic [N-1:0][XW-1:0] frame = '0;
  logic                 s1_valid, s2_valid, overflow;
  logic [1:0]           s2_level;
  logic signed [DW-1:0] s1_approx, s1_detail, s2_approx, s2_detail;

  dwt_top dut (
    .clk, .rst, .load, .frame, .ready,
    .s1_valid, .s1_approx, .s1_detail,
    .s2_valid, .s2_level, .s2_approx, .s2_detail, .overflow
  );

  longint ga1[$], gd1[$], ga2[$], gd2[$];
  int     n_in_pairs = 0, first_pair = -1, last_pair = -1, n_badlevel = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst) begin
      if (s1_valid) begin ga1.push_back(s1_approx); gd1.push_back(s1_detail); end
      if (s2_valid) begin
        if (s2_level != 2) n_badlevel++;
        ga2.push_back(s2_approx);
        gd2.push_back(s2_detail);
      end
      if (dut.u_split.out_valid) begin
        if (first_pair < 0) first_pair = cycle;
        last_pair = cycle;
        n_in_pairs++;
      end
    end
  end

  function automatic void compare(string name, longint got[$], longint exp[$]);
    checks++;
    if (got.size() != exp.size()) begin
      failures++;
      $display("FAIL %s: %0d outputs, expected %0d", name, got.size(), exp.size());
      return;
    end
    for (int i = 0; i < exp.size(); i++) begin
      checks++;
      if (got[i] != exp[i]) begin
        failures++;
        if (failures < 10) $display("FAIL %s[%0d] = %0d expected %0d", name, i, got[i], exp[i]);
      end
    end
  endfunction

  function automatic void near(string name, longint got, real exp, real tol);
    real g;
    g = real'(got) / 16.0;
    checks++;
    if (g - exp > tol || exp - g > tol) begin
      failures++;
      $display("FAIL %s = %f, published %f", name, g, exp);
    end else
      $display("%s = %f (published %f)", name, g, exp);
  endfunction

  function automatic void reset_counts();
    ga1.delete(); gd1.delete(); ga2.delete(); gd2.delete();
    n_in_pairs = 0; first_pair = -1; last_pair = -1;
  endfunction

  task automatic run(input longint sig[$]);
    for (int f = 0; f < sig.size() / N; f++) begin
      while (!ready) @(negedge clk);
      for (int i = 0; i < N; i++) frame[i] = XW'(sig[f * N + i]);
      load = 1;
      @(negedge clk);
      load = 0;
    end
    repeat (20) @(negedge clk);
  endtask

  initial begin
    longint sig[$], x[$], lo[$], hi[$], a1[$], d1[$], a2[$], d2[$];
    real pa1[4] = '{147.7839, 146.3697, 116.6715, 152.0265};
    real pd1[4] = '{-0.7071, -0.7071, -51.6183, -14.8491};
    real pa2[2] = '{207.996011, 189.996356};
    real pd2[2] = '{0.999981, -24.999521};
    int  ex[8]  = '{104, 105, 103, 104, 46, 119, 97, 118};
    for (int k = 0; k < 2; k++) begin
      lo.push_back(longint'(signed'(CW'(dwt_pkg::HAAR_LO[k]))));
      hi.push_back(longint'(signed'(CW'(dwt_pkg::HAAR_HI[k]))));
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);

    // 1. the worked example
    foreach (ex[i]) sig.push_back(ex[i]);
    run(sig);
    foreach (sig[i]) x.push_back(sig[i] * 16);
    level(x, lo, hi, CF, DW, a1, d1);
    level(a1, lo, hi, CF, DW, a2, d2);
    compare("example a1", ga1, a1);
    compare("example d1", gd1, d1);
    compare("example a2", ga2, a2);
    compare("example d2", gd2, d2);
    if (ga1.size() == 4 && ga2.size() == 2) begin
      for (int i = 0; i < 4; i++) begin
        near($sformatf("a1%0d", i + 1), ga1[i], pa1[i], 0.0625);
        near($sformatf("d1%0d", i + 1), gd1[i], pd1[i], 0.0625);
      end
      for (int i = 0; i < 2; i++) begin
        near($sformatf("a2%0d", i + 1), ga2[i], pa2[i], 0.125);
        near($sformatf("d2%0d", i + 1), gd2[i], pd2[i], 0.125);
      end
    end
    checks++;
    if (n_in_pairs != N / 2 || last_pair - first_pair != N / 2 - 1) begin
      failures++;
      $display("FAIL frame took %0d pairs over %0d clocks", n_in_pairs, last_pair - first_pair + 1);
    end

    // 2. 1000-sample signal, continuing from a fresh reset
    rst = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    reset_counts();
    sig.delete();
    x.delete();
    for (int i = 0; i < NSIG; i++) begin
      real v;
      int s;
      v = 80.0 * $sin(6.2831853 * i / 37.0) + 25.0 * $sin(6.2831853 * i / 5.3)
        + real'($urandom_range(0, 16)) - 8.0;
      s = int'(v);
      if (s > 127) s = 127;
      if (s < -128) s = -128;
      sig.push_back(s);
      x.push_back(longint'(s) * 16);
    end
    run(sig);
    level(x, lo, hi, CF, DW, a1, d1);
    level(a1, lo, hi, CF, DW, a2, d2);
    compare("signal a1", ga1, a1);
    compare("signal d1", gd1, d1);
    compare("signal a2", ga2, a2);
    compare("signal d2", gd2, d2);
    checks++;
    if (n_in_pairs != NSIG / 2 || last_pair - first_pair != NSIG / 2 - 1) begin
      failures++;
      $display("FAIL signal took %0d pairs over %0d clocks", n_in_pairs, last_pair - first_pair + 1);
    end else
      $display("1000 samples entered in %0d clocks", last_pair - first_pair + 1);
    checks++;
    if (overflow || n_badlevel != 0) begin
      failures++;
      $display("FAIL overflow=%b bad levels=%0d", overflow, n_badlevel);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
