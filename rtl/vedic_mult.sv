// vedic_mult: N x N-bit Vedic multiplier (vertical and crosswise method).
//
// The method is recursive: an N x N product is built from the four
// (N/2) x (N/2) products of the operand halves (high half M, low half L),
//   mm = aM*bM, ml = aM*bL, lm = aL*bM, ll = aL*bL,
// added up by a combining stage (vedic_combine: two N-bit adders, a half
// adder and an N/2-bit adder), down to 2x2-bit multipliers (vedic_2x2).
//
// The recursion is unrolled here level by level. Level 1 multiplies every
// 2-bit slice of a with every 2-bit slice of b, (N/2)^2 vedic_2x2 cells.
// Level l (slice width S = 2^l, C = N/S slices per operand) holds the C*C
// products pr[i*C + j] = a[S*i +: S] * b[S*j +: S], each 2S bits wide, and
// makes each one with a vedic_combine from four products of level l-1. The
// single product of the last level is p. The hardware is exactly that of the
// recursive description: N = 16 has four 8x8 multipliers and one combining
// stage, each 8x8 multiplier four 4x4 ones and a stage, and so on.
//
// N must be a power of two, at least 2. Every adder of every level uses the
// topology ADDER (vedic_pkg::adder_e). Purely combinational, p = a * b,
// unsigned.
//
// Using one adder topology throughout is this design's reading of "a Vedic
// multiplier using adder X".
module vedic_mult
  import vedic_pkg::*;
#(
  parameter int unsigned N     = 64,
  parameter adder_e      ADDER = ADD_SQRT_CSA
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned NL = $clog2(N);  // number of levels

  if (N < 2 || (1 << NL) != N) begin : g_bad_n
    $error("vedic_mult: N must be a power of two, at least 2");
  end

  for (genvar l = 1; l <= NL; l++) begin : g_lvl
    localparam int unsigned S = 1 << l;   // slice width at this level
    localparam int unsigned C = N / S;    // slices per operand

    logic [2*S-1:0] pr [C*C];

    for (genvar i = 0; i < C; i++) begin : g_i
      for (genvar j = 0; j < C; j++) begin : g_j
        if (l == 1) begin : g_leaf
          vedic_2x2 u_leaf (
            .a(a[S*i +: S]), .b(b[S*j +: S]), .p(pr[i*C + j])
          );
        end else begin : g_node
          // level l-1 has 2C slices per operand; slice 2i+1 is the high half
          vedic_combine #(.N(S), .ADDER(ADDER)) u_comb (
            .mm(g_lvl[l-1].pr[(2*i+1)*(2*C) + (2*j+1)]),
            .ml(g_lvl[l-1].pr[(2*i+1)*(2*C) + (2*j)]),
            .lm(g_lvl[l-1].pr[(2*i)*(2*C)   + (2*j+1)]),
            .ll(g_lvl[l-1].pr[(2*i)*(2*C)   + (2*j)]),
            .p (pr[i*C + j])
          );
        end
      end
    end
  end

  assign p = g_lvl[NL].pr[0];
endmodule
