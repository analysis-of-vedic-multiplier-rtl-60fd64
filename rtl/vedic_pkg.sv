// vedic_pkg: types and constant functions shared by the Vedic multiplier and
// its adders.
//
// adder_e names the five adder topologies a multiplier can be built with. The
// remaining functions compute, at elaboration time, how a carry select adder
// of a given width is cut into blocks:
//   * square-root partition (SQRT-CSA and its BEC variant): the first block is
//     2 bits wide and every later block is one bit wider than the one before
//     it (2, 2, 3, 4, 5, ...); the last block is cut off at the adder width.
//     A 16-bit adder thus gets blocks 2+2+3+4+5. This sequence is the usual
//     one for square-root carry select adders and is this design's choice.
//   * linear partition (RCA-CSA): blocks of CSA_BLOCK bits, the last one cut
//     off at the adder width. The block size is this design's choice.
package vedic_pkg;

  typedef enum logic [2:0] {
    ADD_RCA      = 3'd0,  // ripple carry adder
    ADD_BEC      = 3'd1,  // square-root carry select adder with BEC
    ADD_RCA_CSA  = 3'd2,  // linear carry select adder of ripple carry blocks
    ADD_SQRT_CSA = 3'd3,  // square-root carry select adder
    ADD_CBL      = 3'd4   // common Boolean logic adder
  } adder_e;

  // Width of the linear carry select adder's blocks.
  localparam int unsigned CSA_BLOCK = 4;

  // Nominal width of block g of the square-root partition.
  function automatic int sqrt_blk_size(input int g);
    return (g == 0) ? 2 : g + 1;
  endfunction

  // Lowest bit of block g of the square-root partition.
  function automatic int sqrt_blk_lo(input int g);
    int lo;
    lo = 0;
    for (int i = 0; i < g; i++) lo += sqrt_blk_size(i);
    return lo;
  endfunction

  // Number of blocks a W-bit square-root carry select adder has.
  function automatic int sqrt_num_blk(input int w);
    int n;
    n = 0;
    while (sqrt_blk_lo(n) < w) n++;
    return n;
  endfunction

  // Number of blocks a W-bit linear carry select adder has.
  function automatic int lin_num_blk(input int w);
    return (w + CSA_BLOCK - 1) / CSA_BLOCK;
  endfunction

  // Lowest bit of block g of the linear partition.
  function automatic int lin_blk_lo(input int g);
    return g * CSA_BLOCK;
  endfunction

endpackage
