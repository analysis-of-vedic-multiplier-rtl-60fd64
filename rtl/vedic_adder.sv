// vedic_adder: W-bit adder of a topology chosen at elaboration.
//
// KIND selects one of the five adders the multiplier can be built with
// (vedic_pkg::adder_e): ripple carry, BEC carry select, linear carry select,
// square-root carry select or common Boolean logic. Every choice computes
// {cout, sum} = a + b + cin; they differ only in area, power and delay.
// Purely combinational.
module vedic_adder
  import vedic_pkg::*;
#(
  parameter adder_e      KIND = ADD_SQRT_CSA,
  parameter int unsigned W    = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  if (KIND == ADD_RCA) begin : g_rca
    rca_adder #(.W(W)) u_add (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  end else if (KIND == ADD_BEC) begin : g_bec
    bec_csa_adder #(.W(W)) u_add (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  end else if (KIND == ADD_RCA_CSA) begin : g_csa
    csa_adder #(.W(W)) u_add (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  end else if (KIND == ADD_SQRT_CSA) begin : g_sqrt
    sqrt_csa_adder #(.W(W)) u_add (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  end else begin : g_cbl
    cbl_adder #(.W(W)) u_add (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  end
endmodule
