// bec_csa_adder: W-bit modified square-root carry select adder with Binary to
// Excess-1 Converters ("BEC").
//
// Same block partition as sqrt_csa_adder (2, 2, 3, 4, 5, ... bits, see
// vedic_pkg), but in every block above the lowest the carry-in-1 ripple carry
// adder is replaced by a BEC that adds one to the carry-in-0 result
// (bec_csel_block). That saves area and power at a small cost in delay. The
// lowest block is a plain ripple carry adder fed by cin.
// {cout, sum} = a + b + cin. Purely combinational.
//
// Replacing the carry-in-1 adder by a BEC follows the description of the
// modified square-root carry select adder; the block widths are this design's
// choice, the same as for sqrt_csa_adder.
module bec_csa_adder
  import vedic_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int NB = sqrt_num_blk(W);

  logic [NB:0] c;

  assign c[0] = cin;

  for (genvar g = 0; g < NB; g++) begin : g_blk
    localparam int LO = sqrt_blk_lo(g);
    localparam int HI = (sqrt_blk_lo(g + 1) < W ? sqrt_blk_lo(g + 1) : W) - 1;
    localparam int BW = HI - LO + 1;
    if (g == 0) begin : g_first
      rca_adder #(.W(BW)) u_rca (
        .a(a[HI:LO]), .b(b[HI:LO]), .cin(c[g]), .sum(sum[HI:LO]), .cout(c[g+1])
      );
    end else begin : g_sel
      bec_csel_block #(.W(BW)) u_blk (
        .a(a[HI:LO]), .b(b[HI:LO]), .cin(c[g]), .sum(sum[HI:LO]), .cout(c[g+1])
      );
    end
  end

  assign cout = c[NB];
endmodule
