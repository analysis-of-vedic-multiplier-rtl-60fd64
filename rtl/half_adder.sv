// half_adder: one-bit half adder. sum = a ^ b, cout = a & b. Purely
// combinational.
//
// The multiplier uses it in two places: twice inside the 2x2 leaf multiplier,
// and once in every combining stage, where it adds the carry-outs of the two
// middle adders (the "Half adder" box of the 16-bit block diagram).
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);
  assign sum  = a ^ b;
  assign cout = a & b;
endmodule
