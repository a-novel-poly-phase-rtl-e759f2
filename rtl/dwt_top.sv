// dwt_top: two-stage pipelined poly-phase 1-D discrete wavelet transform.
//
// Data path:
//   frame of N input samples -> even_odd_split (one even/odd pair per clock)
//   -> dwt_stage1 (level 1: approximation a1 and detail d1 per pair)
//   -> dwt_stage2 (buffer + control + identical processing unit, levels
//      2..LEVELS interleaved, approximations fed back level to level).
// Input samples are XW-bit signed integers; inside they become DW-bit words
// with FRAC fractional bits (sample << FRAC). All outputs are in that word
// format: value = word / 2^FRAC.
//
// Interface:
//   load / frame / ready    frame handshake (see even_odd_split); frames
//                           loaded back to back form one continuous signal.
//   s1_valid, s1_approx, s1_detail
//                           level-1 coefficients, one pair per input pair.
//   s2_valid, s2_level, s2_approx, s2_detail
//                           coefficients of levels 2..LEVELS, tagged.
//   overflow                sticky stage-2 buffer overwrite flag.
// Timing with the default Haar filter: an 8-sample frame enters in 4 clocks
// (the cycles after load); a level-1 result follows its input pair by 3
// clocks; a level-2 result follows the level-1 approximation that completes
// its pair by 4 clocks, i.e. 7 clocks after the second of its input pairs.
// Defaults follow the source's worked example: 8-sample frames of 8-bit
// samples, 2-level Haar transform, 16-bit datapath words. ARRAY_MULT = 1
// builds the multipliers as full-adder arrays; 0 leaves them to synthesis
// (hard multipliers on an FPGA) with identical results.
module dwt_top #(
  parameter int XW     = dwt_pkg::XW,
  parameter int N      = dwt_pkg::FRAME,
  parameter int DW     = dwt_pkg::DW,
  parameter int FRAC   = dwt_pkg::FRAC,
  parameter int CW     = dwt_pkg::CW,
  parameter int CF     = dwt_pkg::CF,
  parameter int L      = dwt_pkg::TAPS,
  parameter int LEVELS = dwt_pkg::LEVELS,
  parameter logic [L-1:0][CW-1:0] LO = dwt_pkg::HAAR_LO,
  parameter logic [L-1:0][CW-1:0] HI = dwt_pkg::HAAR_HI,
  parameter int LVW    = $clog2(LEVELS + 1),
  parameter bit ARRAY_MULT = 1'b1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 load,
  input  logic [N-1:0][XW-1:0] frame,
  output logic                 ready,
  output logic                 s1_valid,
  output logic signed [DW-1:0] s1_approx,
  output logic signed [DW-1:0] s1_detail,
  output logic                 s2_valid,
  output logic [LVW-1:0]       s2_level,
  output logic signed [DW-1:0] s2_approx,
  output logic signed [DW-1:0] s2_detail,
  output logic                 overflow
);
  logic          sp_valid;
  logic [XW-1:0] sp_even, sp_odd;
  logic [DW-1:0] w_even, w_odd;

  even_odd_split #(.XW(XW), .N(N)) u_split (
    .clk, .rst, .load, .frame, .ready,
    .out_valid  (sp_valid),
    .frame_first(),
    .frame_last (),
    .x_even     (sp_even),
    .x_odd      (sp_odd)
  );

  // Integer sample to stage word: sign-extend, then FRAC fractional bits.
  always_comb begin
    w_even = DW'(signed'(sp_even)) << FRAC;
    w_odd  = DW'(signed'(sp_odd))  << FRAC;
  end

  dwt_stage1 #(.DW(DW), .CW(CW), .CF(CF), .L(L), .LO(LO), .HI(HI),
               .ARRAY_MULT(ARRAY_MULT)) u_stage1 (
    .clk, .rst,
    .in_valid (sp_valid),
    .x_even   (w_even),
    .x_odd    (w_odd),
    .out_valid(s1_valid),
    .approx   (s1_approx),
    .detail   (s1_detail)
  );

  dwt_stage2 #(.DW(DW), .CW(CW), .CF(CF), .L(L), .LEVELS(LEVELS), .LO(LO), .HI(HI),
               .LVW(LVW), .ARRAY_MULT(ARRAY_MULT)) u_stage2 (
    .clk, .rst,
    .s1_valid  (s1_valid),
    .s1_data   (s1_approx),
    .out_valid (s2_valid),
    .out_level (s2_level),
    .out_approx(s2_approx),
    .out_detail(s2_detail),
    .overflow
  );

  initial begin
    assert (DW >= XW + FRAC + 1) else $error("dwt_top: DW too narrow for XW + FRAC");
  end
endmodule
