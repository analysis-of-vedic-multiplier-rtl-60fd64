// sqrt_csa_adder: W-bit square-root carry select adder ("SQRT-CSA").
//
// Like the linear carry select adder, but the blocks grow in width from the
// bottom up (2, 2, 3, 4, 5, ... bits, see vedic_pkg). A higher block's
// ripple carry adders are longer, so their results are ready at about the
// time the select carry reaches them from below; the delay then grows with
// roughly the square root of W instead of linearly. The lowest block is a
// plain ripple carry adder fed by cin; every other block is a csel_block (two
// ripple carry adders, carry in 0 and 1, and multiplexers).
// {cout, sum} = a + b + cin. Purely combinational.
//
// Growing blocks of paired ripple carry adders follow the description of the
// square-root carry select adder; the exact sequence of block widths is this
// design's choice.
module sqrt_csa_adder
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
      csel_block #(.W(BW)) u_blk (
        .a(a[HI:LO]), .b(b[HI:LO]), .cin(c[g]), .sum(sum[HI:LO]), .cout(c[g+1])
      );
    end
  end

  assign cout = c[NB];
endmodule
