// full_adder: one-bit full adder, the cell the ripple carry adders are
// chained from. sum = a ^ b ^ cin, cout = majority(a, b, cin). Purely
// combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  assign sum  = a ^ b ^ cin;
  assign cout = (a & b) | (cin & (a ^ b));
endmodule
