// dwt_stage1: first pipeline stage, decomposition level 1.
//
// Its control unit keeps the last L/2 even/odd input pairs in a shift
// register (the sub-filter delay lines) and, for every pair that arrives,
// hands the whole window to the processing unit in the next cycle. The
// processing unit returns one level-1 approximation and one level-1 detail
// per input pair. The approximations are also what stage 2 works on.
//
// Interface: in_valid qualifies one pair (x_even = x[2n], x_odd = x[2n+1])
// in DW-bit stage-word format; pairs may come every cycle or with gaps.
// The delay line starts at zero after reset, i.e. the signal is taken as
// zero before its first sample (relevant only for filters longer than 2).
// Timing: out_valid follows in_valid by L/2 + 2 cycles.
module dwt_stage1 #(
  parameter int DW = dwt_pkg::DW,
  parameter int CW = dwt_pkg::CW,
  parameter int CF = dwt_pkg::CF,
  parameter int L  = dwt_pkg::TAPS,
  parameter logic [L-1:0][CW-1:0] LO = dwt_pkg::HAAR_LO,
  parameter logic [L-1:0][CW-1:0] HI = dwt_pkg::HAAR_HI,
  parameter bit ARRAY_MULT = 1'b1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic [DW-1:0]        x_even,
  input  logic [DW-1:0]        x_odd,
  output logic                 out_valid,
  output logic signed [DW-1:0] approx,
  output logic signed [DW-1:0] detail
);
  localparam int NC = L / 2;

  logic [NC-1:0][DW-1:0] win_e, win_o;
  logic                  win_valid;
  logic                  unused_tag;

  always_ff @(posedge clk) begin
    if (rst) begin
      win_e     <= '0;
      win_o     <= '0;
      win_valid <= 1'b0;
    end else begin
      win_valid <= in_valid;
      if (in_valid) begin
        win_e[0] <= x_even;
        win_o[0] <= x_odd;
        for (int m = 1; m < NC; m++) begin
          win_e[m] <= win_e[m-1];
          win_o[m] <= win_o[m-1];
        end
      end
    end
  end

  dwt_pu #(.DW(DW), .CW(CW), .CF(CF), .L(L), .TAGW(1), .LO(LO), .HI(HI),
           .ARRAY_MULT(ARRAY_MULT)) u_pu (
    .clk, .rst,
    .in_valid (win_valid),
    .in_tag   (1'b0),
    .x_even   (win_e),
    .x_odd    (win_o),
    .out_valid(out_valid),
    .out_tag  (unused_tag),
    .approx   (approx),
    .detail   (detail)
  );
endmodule
