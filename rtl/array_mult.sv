// array_mult: signed parallel array multiplier built from full adders.
//
// Multiplies an AW-bit and a BW-bit two's-complement operand into their
// exact P = AW + BW bit product. Both operands are sign-extended to P bits;
// partial product i is the extended multiplicand ANDed with multiplier bit
// i and shifted left i places, truncated to P bits. Rows of full adders
// (one row per partial product, carry-save: each row adds a partial product
// to the previous row's sum and carry vectors) reduce them to two vectors,
// which a carry-select adder resolves. Arithmetic is modulo 2^P, which is
// exact because the signed product always fits in P bits.
//
// The source names a parallel array multiplier as one way to build the MAC
// multiplier; this carry-save form of it is this design's choice. Purely
// combinational.
module array_mult #(
  parameter int AW = 16,
  parameter int BW = 16,
  parameter int P  = AW + BW
) (
  input  logic signed [AW-1:0] a,
  input  logic signed [BW-1:0] b,
  output logic signed [P-1:0]  p
);
  logic [P-1:0] ax, bx;
  assign ax = P'(a);
  assign bx = P'(b);

  // s[i], c[i]: sum and carry vectors after partial products 0..i.
  logic [P-1:0][P-1:0] s, c;
  assign s[0] = bx[0] ? ax : '0;
  assign c[0] = '0;

  for (genvar i = 1; i < P; i++) begin : g_row
    logic [P-1:0] pp;
    logic [P-1:0] co;
    assign pp = bx[i] ? (ax << i) : '0;
    for (genvar j = 0; j < P; j++) begin : g_fa
      full_adder u_fa (.a(s[i-1][j]), .b(c[i-1][j]), .cin(pp[j]), .sum(s[i][j]), .cout(co[j]));
    end
    assign c[i] = {co[P-2:0], 1'b0};   // carry out of bit P-1 is dropped (mod 2^P)
  end

  logic unused_cout;
  csel_adder #(.W(P)) u_cpa (.a(s[P-1]), .b(c[P-1]), .cin(1'b0), .sum(p), .cout(unused_cout));
endmodule
