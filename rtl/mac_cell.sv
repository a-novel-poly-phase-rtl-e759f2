// mac_cell: one poly-phase multiply-accumulate cell.
//
// Each clock it computes
//     acc_out <= acc_in + x_even * c_even + x_odd * c_odd
// i.e. one tap of the even-phase sub-filter and one tap of the odd-phase
// sub-filter, added to the partial sum arriving from the previous cell, all
// in a single clock cycle as the source asks of its MAC. Everything is built
// from one-bit full adders, as in the source's MAC:
//   - two parallel array multipliers (array_mult) form the products;
//   - a row of full adders (carry-save adder) reduces the three addends to
//     a sum and a carry vector;
//   - a carry-select adder (csel_adder) resolves them into the register.
// With ARRAY_MULT = 0 the products are written as '*' instead, which lets
// FPGA synthesis use its hard multipliers; the result is identical.
//
// All operands are two's complement and sign-extended to AW bits; the result
// is exact as long as it fits in AW bits (the enclosing network sizes AW for
// that). Fractional points are the caller's business: the product carries
// the fractional bits of x plus those of c.
//
// Timing: one register, latency 1, a new operand set every cycle. The
// register clears on the synchronous active-high reset. The carry out of the
// top bit of the carry-save row and of the final adder is dropped on
// purpose: the sum is taken modulo 2^AW.
module mac_cell #(
  parameter int DW = dwt_pkg::DW,
  parameter int CW = dwt_pkg::CW,
  parameter int AW = dwt_pkg::acc_width(dwt_pkg::DW, dwt_pkg::CW, dwt_pkg::TAPS),
  parameter bit ARRAY_MULT = 1'b1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic signed [DW-1:0] x_even,
  input  logic signed [DW-1:0] x_odd,
  input  logic signed [CW-1:0] c_even,
  input  logic signed [CW-1:0] c_odd,
  input  logic signed [AW-1:0] acc_in,
  output logic signed [AW-1:0] acc_out
);
  logic signed [AW-1:0] p_even, p_odd;
  logic        [AW-1:0] cs_sum, cs_carry, sum_q;
  logic                 unused_cout;

  if (ARRAY_MULT) begin : g_array
    logic signed [DW+CW-1:0] pe, po;
    array_mult #(.AW(DW), .BW(CW)) u_mul_e (.a(x_even), .b(c_even), .p(pe));
    array_mult #(.AW(DW), .BW(CW)) u_mul_o (.a(x_odd),  .b(c_odd),  .p(po));
    assign p_even = AW'(pe);
    assign p_odd  = AW'(po);
  end else begin : g_operator
    assign p_even = AW'(x_even) * AW'(c_even);
    assign p_odd  = AW'(x_odd) * AW'(c_odd);
  end

  // Carry-save row: three operands in, sum and carry vectors out.
  for (genvar i = 0; i < AW; i++) begin : g_csa
    full_adder u_fa (
      .a   (p_even[i]),
      .b   (p_odd[i]),
      .cin (acc_in[i]),
      .sum (cs_sum[i]),
      .cout(cs_carry[i])
    );
  end

  csel_adder #(.W(AW)) u_cpa (
    .a   (cs_sum),
    .b   ({cs_carry[AW-2:0], 1'b0}),
    .cin (1'b0),
    .sum (sum_q),
    .cout(unused_cout)
  );

  always_ff @(posedge clk) begin
    if (rst) acc_out <= '0;
    else     acc_out <= signed'(sum_q);
  end
endmodule
