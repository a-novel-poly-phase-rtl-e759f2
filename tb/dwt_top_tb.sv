// dwt_top_tb: end-to-end test of the two-stage DWT at a larger setting:
// 16-sample frames, 4-tap Daubechies filter, 4 decomposition levels.
//
// Random frames are loaded partly back to back and partly with idle gaps;
// all frames together are one continuous signal. Every level-1 output of
// stage 1 and every level-2..4 output of stage 2 must equal the reference
// cascade word for word. Counted and required to happen at least once:
//   - frames loaded back to back (splitter streaming without a bubble),
//     each taking exactly N/2 clocks;
//   - idle gaps between frames;
//   - cycles in which two levels wait in the buffer at once (interleaving);
//   - approximations fed back from stage 2 into its own buffer.
// The buffer overflow flag must stay low.
module dwt_top_tb;
  import dwt_ref_pkg::*;
  localparam int XW = 8, N = 16, DW = 16, CW = 16, CF = 14, J = 4, NFR = 64;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic                 load = 0, ready;
  logic [N-1:0][XW-1:0] frame = '0;
  logic                 s1_valid, s2_valid, overflow;
  logic [2:0]           s2_level;
  logic signed [DW-1:0] s1_approx, s1_detail, s2_approx, s2_detail;

  dwt_top #(.N(N), .L(4), .LEVELS(J), .LO(D4_LO), .HI(D4_HI)) dut (
    .clk, .rst, .load, .frame, .ready,
    .s1_valid, .s1_approx, .s1_detail,
    .s2_valid, .s2_level, .s2_approx, .s2_detail, .overflow
  );

  longint ga[J+1][$], gd[J+1][$];
  int n_b2b = 0, n_gap = 0, n_conflict = 0, n_feedback = 0, n_badlevel = 0;
  int last_load = -1000, bad_period = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst) begin
      if (s1_valid) begin ga[1].push_back(s1_approx); gd[1].push_back(s1_detail); end
      if (s2_valid) begin
        if (s2_level < 2 || s2_level > J) n_badlevel++;
        else begin
          ga[s2_level].push_back(s2_approx);
          gd[s2_level].push_back(s2_detail);
          if (s2_level < J) n_feedback++;
        end
      end
      if ($countones(dut.u_stage2.pend) > 1) n_conflict++;
      if (load && ready) begin
        if (cycle - last_load == N / 2) n_b2b++;
        else if (cycle - last_load < N / 2) bad_period++;
        else n_gap++;
        last_load = cycle;
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

  initial begin
    longint x[$], lo[$], hi[$], ea[J+1][$], ed[J+1][$];
    for (int k = 0; k < 4; k++) begin
      lo.push_back(longint'(signed'(CW'(D4_LO[k]))));
      hi.push_back(longint'(signed'(CW'(D4_HI[k]))));
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    for (int f = 0; f < NFR; f++) begin
      if (f % 8 == 7) repeat ($urandom_range(1, 5)) @(negedge clk);
      while (!ready) @(negedge clk);
      for (int i = 0; i < N; i++) begin
        frame[i] = XW'($urandom);
        x.push_back(longint'($signed(frame[i])) * 16);
      end
      load = 1;
      @(negedge clk);
      load = 0;
      // leave load low until the frame's last pair, then reload
      while (!ready) @(negedge clk);
    end
    repeat (60) @(posedge clk);

    ea[0] = x;
    for (int j = 1; j <= J; j++) level(ea[j-1], lo, hi, CF, DW, ea[j], ed[j]);
    for (int j = 1; j <= J; j++) begin
      compare($sformatf("a%0d", j), ga[j], ea[j]);
      compare($sformatf("d%0d", j), gd[j], ed[j]);
    end
    $display("back-to-back frames=%0d gaps=%0d level conflicts=%0d feedback results=%0d",
             n_b2b, n_gap, n_conflict, n_feedback);
    checks++;
    if (n_b2b == 0 || n_gap == 0 || n_conflict == 0 || n_feedback == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    checks++;
    if (overflow || n_badlevel != 0 || bad_period != 0) begin
      failures++;
      $display("FAIL overflow=%b bad levels=%0d short frames=%0d", overflow, n_badlevel, bad_period);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
