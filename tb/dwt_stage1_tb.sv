// dwt_stage1_tb: checks pipeline stage 1 (level 1) for two filters.
//
// The same pair stream, with random gaps, drives a default (Haar) stage and
// a 4-tap Daubechies stage, whose sub-filters need one older pair from the
// delay line. Both output streams must equal the reference level-1 transform
// of the stream, word for word; the Haar stage must answer each pair exactly
// L/2 + 2 = 3 cycles later. The stream starts with the reference 8-sample
// example.
module dwt_stage1_tb;
  import dwt_ref_pkg::*;
  localparam int DW = dwt_pkg::DW, CW = dwt_pkg::CW, CF = dwt_pkg::CF;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic                 in_valid = 0;
  logic [DW-1:0]        xe = '0, xo = '0;
  logic                 v_h, v_d;
  logic signed [DW-1:0] a_h, d_h, a_d, d_d;

  dwt_stage1 dut_haar (.clk, .rst, .in_valid, .x_even(xe), .x_odd(xo),
                       .out_valid(v_h), .approx(a_h), .detail(d_h));
  dwt_stage1 #(.L(4), .LO(D4_LO), .HI(D4_HI)) dut_d4 (
    .clk, .rst, .in_valid, .x_even(xe), .x_odd(xo), .out_valid(v_d), .approx(a_d), .detail(d_d));

  longint x[$];
  longint ga_h[$], gd_h[$], ga_d[$], gd_d[$];
  int     tin[$], tout[$];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && v_h) begin ga_h.push_back(a_h); gd_h.push_back(d_h); tout.push_back(cycle); end
    if (!rst && v_d) begin ga_d.push_back(a_d); gd_d.push_back(d_d); end
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
    longint lo_h[$], hi_h[$], lo_d[$], hi_d[$], ea[$], ed[$];
    int ref_in[8] = '{104, 105, 103, 104, 46, 119, 97, 118};
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
    for (int n = 0; n < 400; n++) begin
      longint e, o;
      @(negedge clk);
      if (n >= 4 && $urandom_range(0, 3) == 0) begin
        in_valid = 0;
        xe = DW'($urandom);   // junk on the bus while idle
        xo = DW'($urandom);
        @(negedge clk);
      end
      if (n < 4) begin
        e = ref_in[2*n] * 16;
        o = ref_in[2*n+1] * 16;
      end else begin
        e = longint'($signed(8'($urandom))) * 16;
        o = longint'($signed(8'($urandom))) * 16;
      end
      in_valid = 1;
      xe = DW'(e);
      xo = DW'(o);
      x.push_back(e);
      x.push_back(o);
      tin.push_back(cycle);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (8) @(posedge clk);
    level(x, lo_h, hi_h, CF, DW, ea, ed);
    compare("haar approx", ga_h, ea);
    compare("haar detail", gd_h, ed);
    level(x, lo_d, hi_d, CF, DW, ea, ed);
    compare("d4 approx", ga_d, ea);
    compare("d4 detail", gd_d, ed);
    checks++;
    if (tout.size() != tin.size()) failures++;
    else
      for (int i = 0; i < tin.size(); i++)
        if (tout[i] - tin[i] != 3) begin
          failures++;
          $display("FAIL latency %0d", tout[i] - tin[i]);
          break;
        end
    $display("a11..a14 = %f %f %f %f", real'(ga_h[0]) / 16, real'(ga_h[1]) / 16,
             real'(ga_h[2]) / 16, real'(ga_h[3]) / 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
