// dwt_pu: processing unit of one pipeline stage.
//
// Two L-tap MAC-cell networks, one with the low-pass (scaling) coefficients
// LO and one with the high-pass (wavelet) coefficients HI, share one window
// of even/odd sample pairs and produce one approximation and one detail
// coefficient per clock: the poly-phase analysis filter bank of the source,
//     [a]   [LO_even LO_odd]   [x_even]
//     [d] = [HI_even HI_odd] x [x_odd ]
// with down-sampling done before filtering, so no product is discarded.
// The full-precision sums are rounded half-up by CF bits (the coefficient
// fraction) and saturated to DW bits, so the outputs are in the same format
// as the input words and can feed the next decomposition level.
//
// Both pipeline stages instantiate this unit unchanged; a TAGW-bit tag
// travels alongside each window so stage 2 knows which level a result
// belongs to.
//
// Timing: one window per cycle, latency L/2 + 1 cycles (L/2 in the MAC
// networks, one in the output rounding register). Synchronous active-high
// reset clears the valid flags and registers.
module dwt_pu #(
  parameter int DW   = dwt_pkg::DW,
  parameter int CW   = dwt_pkg::CW,
  parameter int CF   = dwt_pkg::CF,
  parameter int L    = dwt_pkg::TAPS,
  parameter int TAGW = 1,
  parameter logic [L-1:0][CW-1:0] LO = dwt_pkg::HAAR_LO,
  parameter logic [L-1:0][CW-1:0] HI = dwt_pkg::HAAR_HI,
  parameter bit ARRAY_MULT = 1'b1
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  input  logic [TAGW-1:0]        in_tag,
  input  logic [L/2-1:0][DW-1:0] x_even,
  input  logic [L/2-1:0][DW-1:0] x_odd,
  output logic                   out_valid,
  output logic [TAGW-1:0]        out_tag,
  output logic signed [DW-1:0]   approx,
  output logic signed [DW-1:0]   detail
);
  localparam int NC = L / 2;
  localparam int AW = dwt_pkg::acc_width(DW, CW, L);

  logic                 lo_valid, hi_valid;
  logic signed [AW-1:0] lo_y, hi_y;
  logic [NC-1:0][TAGW-1:0] tpipe;

  mac_network #(.DW(DW), .CW(CW), .L(L), .AW(AW), .COEF(LO), .ARRAY_MULT(ARRAY_MULT)) u_lo (
    .clk, .rst, .in_valid, .x_even, .x_odd, .out_valid(lo_valid), .y(lo_y)
  );
  mac_network #(.DW(DW), .CW(CW), .L(L), .AW(AW), .COEF(HI), .ARRAY_MULT(ARRAY_MULT)) u_hi (
    .clk, .rst, .in_valid, .x_even, .x_odd, .out_valid(hi_valid), .y(hi_y)
  );

  always_ff @(posedge clk) begin
    if (rst) tpipe <= '0;
    else begin
      tpipe[0] <= in_tag;
      for (int i = 1; i < NC; i++) tpipe[i] <= tpipe[i-1];
    end
  end

  // Round half-up by CF bits, then clamp to the DW-bit signed range.
  localparam logic signed [AW-1:0] HALF = AW'(1) << (CF - 1);
  localparam logic signed [AW-1:0] MAXV = AW'((64'sd1 <<< (DW - 1)) - 1);
  localparam logic signed [AW-1:0] MINV = AW'(-(64'sd1 <<< (DW - 1)));

  function automatic logic signed [DW-1:0] round_sat(logic signed [AW-1:0] v);
    logic signed [AW-1:0] r;
    r = (v + HALF) >>> CF;
    if (r > MAXV)      return {1'b0, {(DW-1){1'b1}}};
    else if (r < MINV) return {1'b1, {(DW-1){1'b0}}};
    else               return DW'(r);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
      approx    <= '0;
      detail    <= '0;
    end else begin
      out_valid <= lo_valid;
      out_tag   <= tpipe[NC-1];
      approx    <= round_sat(lo_y);
      detail    <= round_sat(hi_y);
    end
  end

  // Both networks run in lock step.
  assert property (@(posedge clk) disable iff (rst) lo_valid == hi_valid);
endmodule
