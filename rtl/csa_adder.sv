// csa_adder: W-bit linear carry select adder ("RCA-CSA").
//
// The operands are cut into blocks of equal width (vedic_pkg::CSA_BLOCK bits,
// the last block takes what is left). The lowest block is a plain ripple
// carry adder fed by cin; every other block is a csel_block, whose two ripple
// carry adders (carry in 0 and 1) run in parallel and whose multiplexers are
// driven by the carry out of the block below. The carry thus crosses one
// multiplexer per block instead of one full adder per bit.
// {cout, sum} = a + b + cin. Purely combinational.
//
// Equal-size blocks with a ripple carry adder pair per block follow the
// description of the linear carry select adder; the block width of 4 is this
// design's choice.
module csa_adder
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
  localparam int NB = lin_num_blk(W);

  logic [NB:0] c;

  assign c[0] = cin;

  for (genvar g = 0; g < NB; g++) begin : g_blk
    localparam int LO = lin_blk_lo(g);
    localparam int HI = (lin_blk_lo(g + 1) < W ? lin_blk_lo(g + 1) : W) - 1;
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
