// csel_adder: W-bit carry-select adder built from one-bit full adders.
//
// The operands are cut into blocks of BLK bits. Block 0 is a ripple-carry
// adder on the real carry-in. Every other block holds two ripple-carry
// adders, one assuming carry-in 0 and one assuming carry-in 1, and a
// multiplexer picks the right sum when the carry of the block below
// arrives, so the carry ripples through one multiplexer per block instead
// of BLK full adders. Carry-select is one of the two adder styles the
// source names for the MAC; the block size is this design's choice.
//
// Interface: sum = a + b + cin (mod 2^W), cout is the carry out of bit
// W-1. Purely combinational.
module csel_adder #(
  parameter int W   = 34,
  parameter int BLK = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int NBLK = (W + BLK - 1) / BLK;

  logic [NBLK:0] bc;   // carry into each block
  assign bc[0] = cin;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    localparam int LO = k * BLK;
    localparam int BW = (W - LO < BLK) ? (W - LO) : BLK;
    if (k == 0) begin : g_ripple
      logic [BW:0] c;
      assign c[0] = bc[0];
      for (genvar i = 0; i < BW; i++) begin : g_fa
        full_adder u_fa (.a(a[LO+i]), .b(b[LO+i]), .cin(c[i]), .sum(sum[LO+i]), .cout(c[i+1]));
      end
      assign bc[1] = c[BW];
    end else begin : g_select
      logic [BW:0]   c0, c1;
      logic [BW-1:0] s0, s1;
      assign c0[0] = 1'b0;
      assign c1[0] = 1'b1;
      for (genvar i = 0; i < BW; i++) begin : g_fa
        full_adder u_fa0 (.a(a[LO+i]), .b(b[LO+i]), .cin(c0[i]), .sum(s0[i]), .cout(c0[i+1]));
        full_adder u_fa1 (.a(a[LO+i]), .b(b[LO+i]), .cin(c1[i]), .sum(s1[i]), .cout(c1[i+1]));
      end
      assign sum[LO+BW-1:LO] = bc[k] ? s1 : s0;
      assign bc[k+1]         = bc[k] ? c1[BW] : c0[BW];
    end
  end

  assign cout = bc[NBLK];
endmodule
