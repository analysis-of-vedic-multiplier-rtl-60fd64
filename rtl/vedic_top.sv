// vedic_top: the five Vedic multipliers of the adder-topology comparison.
//
// Five N x N-bit recursive Vedic multipliers (vedic_mult) share the operands
// a and b. They are identical except for the adder that combines the partial
// products at every level of the recursion:
//   p_rca   ripple carry adder
//   p_bec   square-root carry select adder with Binary to Excess-1 Converters
//   p_csa   linear carry select adder of ripple carry blocks (RCA-CSA)
//   p_sqrt  square-root carry select adder (SQRT-CSA)
//   p_cbl   common Boolean logic adder
// Every output is the 2N-bit unsigned product a * b; the variants differ only
// in area, power and delay, which is what the comparison measures. Purely
// combinational: there is no clock and no reset, a product is valid one
// combinational delay after the operands change.
//
// N defaults to 64, the largest size compared and the one with the headline
// result (SQRT-CSA fastest); 8, 16 and 32 are the other sizes compared.
// Placing the five variants side by side in one module is this design's
// choice, so that one instance holds the whole comparison; a single variant is
// vedic_mult with its ADDER parameter set.
module vedic_top
  import vedic_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p_rca,
  output logic [2*N-1:0] p_bec,
  output logic [2*N-1:0] p_csa,
  output logic [2*N-1:0] p_sqrt,
  output logic [2*N-1:0] p_cbl
);
  vedic_mult #(.N(N), .ADDER(ADD_RCA))      u_rca  (.a(a), .b(b), .p(p_rca));
  vedic_mult #(.N(N), .ADDER(ADD_BEC))      u_bec  (.a(a), .b(b), .p(p_bec));
  vedic_mult #(.N(N), .ADDER(ADD_RCA_CSA))  u_csa  (.a(a), .b(b), .p(p_csa));
  vedic_mult #(.N(N), .ADDER(ADD_SQRT_CSA)) u_sqrt (.a(a), .b(b), .p(p_sqrt));
  vedic_mult #(.N(N), .ADDER(ADD_CBL))      u_cbl  (.a(a), .b(b), .p(p_cbl));
endmodule
