// dwt_stage2: second pipeline stage, decomposition levels 2..J.
//
// Stage 1 does level 1, half of all the filtering; levels 2..J together are
// less than the other half, so stage 2 can do all of them with a processing
// unit identical to stage 1's, provided it interleaves the levels. That is
// the stage-equalised two-stage pipeline. Stage 2 consists of:
//   dwt_buffer   collects approximations of level j-1 into pairs (from
//                stage 1 for j = 2, from its own output for j > 2);
//   control unit each cycle picks the lowest level with a pending pair,
//                reads that level's window from the buffer into the
//                processing unit, tagged with the level;
//   dwt_pu       the same low/high poly-phase filter pair as stage 1.
// A result of level j < J sends its approximation back to the buffer entry
// of level j+1; every result (approximation and detail, with its level) is
// also put out.
//
// Interface: s1_valid/s1_data is stage 1's approximation stream. out_level
// holds the decomposition level (2..LEVELS) of out_approx / out_detail.
// overflow is the buffer's sticky overwrite flag (never set in normal use).
// Timing: a pair is read the cycle after its second sample is written,
// unless a lower level has a pair pending then; without such a wait the
// result appears L/2 + 3 cycles after the second sample's valid (4 for
// Haar). Lowest-level-first scheduling is this design's choice.
module dwt_stage2 #(
  parameter int DW     = dwt_pkg::DW,
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
  input  logic                 s1_valid,
  input  logic [DW-1:0]        s1_data,
  output logic                 out_valid,
  output logic [LVW-1:0]       out_level,
  output logic signed [DW-1:0] out_approx,
  output logic signed [DW-1:0] out_detail,
  output logic                 overflow
);
  localparam int NC = L / 2;
  localparam int NB = LEVELS - 1;
  localparam int IW = (NB > 1) ? $clog2(NB) : 1;

  logic [NB-1:0]         pend;
  logic                  rd_en;
  logic [IW-1:0]         rd_index;
  logic [NC-1:0][DW-1:0] rd_even, rd_odd;

  logic                  fb_valid;
  logic [IW-1:0]         fb_index;

  logic [NC-1:0][DW-1:0] pu_e, pu_o;
  logic                  pu_valid;
  logic [IW-1:0]         pu_tag;

  logic                  res_valid;
  logic [IW-1:0]         res_tag;
  logic signed [DW-1:0]  res_a, res_d;

  dwt_buffer #(.DW(DW), .L(L), .NB(NB), .IW(IW)) u_buf (
    .clk, .rst,
    .s1_valid, .s1_data,
    .fb_valid, .fb_index, .fb_data(res_a),
    .rd_en, .rd_index,
    .pend, .rd_even, .rd_odd,
    .overflow
  );

  // Control unit: lowest pending level first.
  always_comb begin
    rd_en    = 1'b0;
    rd_index = '0;
    for (int b = NB - 1; b >= 0; b--) begin
      if (pend[b]) begin
        rd_en    = 1'b1;
        rd_index = IW'(b);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pu_valid <= 1'b0;
      pu_tag   <= '0;
      pu_e     <= '0;
      pu_o     <= '0;
    end else begin
      pu_valid <= rd_en;
      if (rd_en) begin
        pu_tag <= rd_index;
        pu_e   <= rd_even;
        pu_o   <= rd_odd;
      end
    end
  end

  dwt_pu #(.DW(DW), .CW(CW), .CF(CF), .L(L), .TAGW(IW), .LO(LO), .HI(HI),
           .ARRAY_MULT(ARRAY_MULT)) u_pu (
    .clk, .rst,
    .in_valid (pu_valid),
    .in_tag   (pu_tag),
    .x_even   (pu_e),
    .x_odd    (pu_o),
    .out_valid(res_valid),
    .out_tag  (res_tag),
    .approx   (res_a),
    .detail   (res_d)
  );

  // Approximations of all but the last level go back to the buffer.
  always_comb begin
    fb_valid = res_valid && (int'(res_tag) < NB - 1);
    fb_index = res_tag + 1'b1;
  end

  always_comb begin
    out_valid  = res_valid;
    out_level  = LVW'(res_tag) + LVW'(2);
    out_approx = res_a;
    out_detail = res_d;
  end

  initial begin
    assert (LEVELS >= 2) else $error("dwt_stage2: LEVELS must be at least 2");
  end
endmodule
