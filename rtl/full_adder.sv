// full_adder: one-bit full adder, the basic cell of the carry-save adder row
// inside each MAC cell.
//
// sum = a ^ b ^ cin, cout = majority(a, b, cin). Purely combinational. The
// source builds its MAC from one-bit full adders (in static and dynamic
// circuit styles); at the logic level both styles are this function.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule
