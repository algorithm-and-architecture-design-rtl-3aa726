// ibs_pkg: types and constants shared by the blocks of the iterative binary
// search (IBS) motion estimator.
//
// Geometry (search range +/-16, fixed by the memory organisation):
//  * A binary image is handled in 8x8 "regions"; one region is one 64-bit word,
//    bit (r*8 + c) holding the pixel at row r, column c of the region.
//  * The search window of one macroblock (MB) is 48x48 pixels = 6x6 regions.
//    The reference block for displacement (dx,dy), dx,dy in -16..+15, starts at
//    window pixel (16+dx, 16+dy).
//  * The 32x32 search locations are split into 4x4 "search regions" of 8x8
//    locations. Search region (rx,ry) needs window regions rx..rx+2, ry..ry+2.
//  * Window region (bx,by) lives in bank (by%3)*3 + bx%3, word
//    32*pingpong + 4*z + (by/3)*2 + bx/3, where z is the bit-plane (iteration).
//  * The current MB is four 8x8 quarters q (raster order) in banks C0..C3,
//    word 8*pingpong + z.
//  * Each search location yields sixteen 4x4 SODs, indexed raster order over
//    the MB (index = 4*row4 + col4).
package ibs_pkg;

  localparam int unsigned PHI_MAX   = 8;   // number of bit-planes (Phi)
  localparam int unsigned NWIN      = 6;   // window regions per dimension
  localparam int unsigned NBANK_REF = 9;   // S0..S8
  localparam int unsigned NBANK_CUR = 4;   // C0..C3
  localparam int unsigned REF_DEPTH = 64;  // words per LM_REF bank
  localparam int unsigned CUR_DEPTH = 16;  // words per LM_CUR bank
  localparam int unsigned SODW      = 8;   // accumulated 4x4 SOD width
  localparam int unsigned NPART     = 41;  // 1+2+2+4+8+8+16 partitions

  typedef logic [63:0] region_t;           // one 8x8 binary region
  typedef logic [4:0]  sod4_t;             // one 4x4 SOD of one plane, 0..16
  typedef logic [SODW-1:0] asod_t;         // accumulated 4x4 SOD

  typedef logic signed [5:0] mvc_t;        // one MV component, -16..+15 (or -32..31)
  typedef struct packed {
    mvc_t x;
    mvc_t y;
  } mv_t;

  // sixteen 4x4 SODs of one search location
  typedef sod4_t [15:0] sod16_t;
  typedef asod_t [15:0] asod16_t;

endpackage
