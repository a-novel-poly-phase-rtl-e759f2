// dwt_stage2_tb: checks pipeline stage 2.
//
// The same approximation stream (as stage 1 would deliver it, with random
// gaps and long gap-free runs) drives
//   - a default stage 2 (Haar, 2 levels): its level-2 results must match
//     the reference and appear 4 cycles after the sample that completes
//     their pair;
//   - a 4-level stage 2 with the 4-tap Daubechies filter: its level 2, 3
//     and 4 results must match the reference cascade. Cycles in which two
//     levels wait at once (the scheduler must interleave them) are counted
//     and must occur; the buffer must never overflow.
module dwt_stage2_tb;
  import dwt_ref_pkg::*;
  localparam int DW = dwt_pkg::DW, CW = dwt_pkg::CW, CF = dwt_pkg::CF;
  localparam int NS = 1600;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic                 s1_valid = 0;
  logic [DW-1:0]        s1_data = '0;

  logic                 v_h, ov_h;
  logic [1:0]           lv_h;
  logic signed [DW-1:0] a_h, d_h;
  dwt_stage2 dut_haar (.clk, .rst, .s1_valid, .s1_data, .out_valid(v_h), .out_level(lv_h),
                       .out_approx(a_h), .out_detail(d_h), .overflow(ov_h));

  logic                 v_d, ov_d;
  logic [2:0]           lv_d;
  logic signed [DW-1:0] a_d, d_d;
  dwt_stage2 #(.L(4), .LEVELS(4), .LO(D4_LO), .HI(D4_HI)) dut_d4 (
    .clk, .rst, .s1_valid, .s1_data, .out_valid(v_d), .out_level(lv_d),
    .out_approx(a_d), .out_detail(d_d), .overflow(ov_d));

  longint ga_h[$], gd_h[$];
  longint ga_d[5][$], gd_d[5][$];
  int     tpair[$], tout[$];
  int     nconflict = 0, nbadlevel = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst) begin
      if (v_h) begin
        ga_h.push_back(a_h); gd_h.push_back(d_h); tout.push_back(cycle);
        if (lv_h != 2) nbadlevel++;
      end
      if (v_d) begin
        if (lv_d < 2 || lv_d > 4) nbadlevel++;
        else begin
          ga_d[lv_d].push_back(a_d);
          gd_d[lv_d].push_back(d_d);
        end
      end
      if ($countones(dut_d4.pend) > 1) nconflict++;
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

  initial begin
    longint x[$], lo_h[$], hi_h[$], lo_d[$], hi_d[$], a2[$], d2[$], a3[$], d3[$], a4[$], d4[$];
    for (int k = 0; k < 2; k++) begin
      lo_h.push_back(longint'(signed'(CW'(dwt_pkg::HAAR_LO[k]))));
      hi_h.push_back(longint'(signed'(CW'(dwt_pkg::HAAR_HI[k]))));
    end
    for (int k = 0; k < 4; k++) begin
      lo_d.push_back(longint'(signed'(CW'(D4_LO[k]))));
      hi_d.push_back(longint'(signed'(CW'(D4_HI[k]))));
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < NS; n++) begin
      longint v;
      @(negedge clk);
      // gap-free runs in the first half, random gaps in the second
      if (n >= NS / 2 && $urandom_range(0, 2) == 0) begin
        s1_valid = 0;
        @(negedge clk);
      end
      v = longint'($signed(12'($urandom))) * 4;
      s1_valid = 1;
      s1_data = DW'(v);
      x.push_back(v);
      if (n % 2 == 1) tpair.push_back(cycle);
    end
    @(negedge clk);
    s1_valid = 0;
    repeat (40) @(posedge clk);

    level(x, lo_h, hi_h, CF, DW, a2, d2);
    compare("haar a2", ga_h, a2);
    compare("haar d2", gd_h, d2);
    checks++;
    if (tout.size() == tpair.size())
      foreach (tpair[i])
        if (tout[i] - tpair[i] != 4) begin
          failures++;
          $display("FAIL level-2 latency %0d", tout[i] - tpair[i]);
          break;
        end

    level(x, lo_d, hi_d, CF, DW, a2, d2);
    level(a2, lo_d, hi_d, CF, DW, a3, d3);
    level(a3, lo_d, hi_d, CF, DW, a4, d4);
    compare("d4 a2", ga_d[2], a2);
    compare("d4 d2", gd_d[2], d2);
    compare("d4 a3", ga_d[3], a3);
    compare("d4 d3", gd_d[3], d3);
    compare("d4 a4", ga_d[4], a4);
    compare("d4 d4", gd_d[4], d4);
    checks++;
    if (ov_h || ov_d || nbadlevel != 0 || nconflict == 0) begin
      failures++;
      $display("FAIL overflow=%b/%b bad levels=%0d conflicts=%0d", ov_h, ov_d, nbadlevel, nconflict);
    end
    $display("cycles with two levels waiting: %0d", nconflict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
