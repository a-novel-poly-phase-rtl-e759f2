// dwt_pu_tb: checks the processing unit with the default Haar filter pair.
//
// 1. The four level-1 pairs of the reference example, (104,105), (103,104),
//    (46,119), (97,118), must give approximations 147.7839, 146.3697,
//    116.6715, 152.0265 and details -0.7071, -0.7071, -51.6183, -14.8491
//    to within one output LSB (1/16).
// 2. Random windows (with gaps) must match the integer reference model bit
//    for bit, carry their tag along and come out L/2 + 1 = 2 cycles later.
// 3. Full-scale inputs must saturate instead of wrapping.
module dwt_pu_tb;
  import dwt_ref_pkg::*;
  localparam int DW = dwt_pkg::DW, CW = dwt_pkg::CW, CF = dwt_pkg::CF, L = dwt_pkg::TAPS;
  localparam int NC = L / 2, TAGW = 3;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic                  in_valid = 0, out_valid;
  logic [TAGW-1:0]       in_tag = '0, out_tag;
  logic [NC-1:0][DW-1:0] xe = '0, xo = '0;
  logic signed [DW-1:0]  approx, detail;

  dwt_pu #(.TAGW(TAGW)) dut (
    .clk, .rst, .in_valid, .in_tag, .x_even(xe), .x_odd(xo),
    .out_valid, .out_tag, .approx, .detail
  );

  longint ea_q[$], ed_q[$];
  int     tag_q[$], tim_q[$];
  real    pa_q[$], pd_q[$];   // published values, or a NaN-free sentinel 1e9
  int     nout = 0, nsat = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      longint ea, ed;
      real pa, pd;
      int tg, tm;
      if (ea_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        ea = ea_q.pop_front(); ed = ed_q.pop_front();
        tg = tag_q.pop_front(); tm = tim_q.pop_front();
        pa = pa_q.pop_front(); pd = pd_q.pop_front();
        checks += 3;
        if (longint'(approx) != ea || longint'(detail) != ed) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d d=%0d expected %0d %0d", approx, detail, ea, ed);
        end
        if (int'(out_tag) != tg) begin
          failures++;
          $display("FAIL tag %0d expected %0d", out_tag, tg);
        end
        if (cycle - tm != NC + 1) begin
          failures++;
          $display("FAIL latency %0d", cycle - tm);
        end
        if (pa < 1e8) begin
          checks += 2;
          if ((real'(approx) / 16.0 - pa) > 0.0625 || (pa - real'(approx) / 16.0) > 0.0625 ||
              (real'(detail) / 16.0 - pd) > 0.0625 || (pd - real'(detail) / 16.0) > 0.0625) begin
            failures++;
            $display("FAIL example a=%f d=%f expected %f %f", real'(approx) / 16.0,
                     real'(detail) / 16.0, pa, pd);
          end else
            $display("example a=%f d=%f (published %f %f)", real'(approx) / 16.0,
                     real'(detail) / 16.0, pa, pd);
        end
        if (approx == 16'sh7fff) nsat++;
      end
      nout++;
    end
  end

  task automatic send(input longint e, input longint o, input real pa, input real pd);
    longint sa, sd;
    @(negedge clk);
    in_valid = 1;
    in_tag   = TAGW'($urandom);
    xe[0] = DW'(e);
    xo[0] = DW'(o);
    sa = longint'(signed'(CW'(dwt_pkg::HAAR_LO[0]))) * o + longint'(signed'(CW'(dwt_pkg::HAAR_LO[1]))) * e;
    sd = longint'(signed'(CW'(dwt_pkg::HAAR_HI[0]))) * o + longint'(signed'(CW'(dwt_pkg::HAAR_HI[1]))) * e;
    ea_q.push_back(round_sat(sa, CF, DW));
    ed_q.push_back(round_sat(sd, CF, DW));
    tag_q.push_back(int'(in_tag));
    tim_q.push_back(cycle);
    pa_q.push_back(pa);
    pd_q.push_back(pd);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    send(104 * 16, 105 * 16, 147.7839, -0.7071);
    send(103 * 16, 104 * 16, 146.3697, -0.7071);
    send(46 * 16, 119 * 16, 116.6715, -51.6183);
    send(97 * 16, 118 * 16, 152.0265, -14.8491);
    send(32767, 32767, 1e9, 1e9);
    for (int t = 0; t < 500; t++) begin
      if ($urandom_range(0, 3) == 0) begin
        @(negedge clk);
        in_valid = 0;
      end
      send(longint'($signed(16'($urandom))), longint'($signed(16'($urandom))), 1e9, 1e9);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (NC + 4) @(posedge clk);
    checks++;
    if (ea_q.size() != 0 || nsat == 0) begin
      failures++;
      $display("FAIL %0d outputs missing, %0d saturated", ea_q.size(), nsat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
