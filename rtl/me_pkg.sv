// Shared types and constants of the mixed-mode coarse motion estimation unit.
//
// The coarse search works on 2:1 down-sampled pictures: a 16x16 macroblock
// becomes an 8x8 block and a +/-16 pixel full-resolution search area becomes
// a -8..+7 displacement range, held in a 24x24 down-sampled reference window.
// Motion vectors are therefore 4-bit two's-complement numbers per component
// (exactly -8..+7), in down-sampled pixel units. A SAD over 64 pixels of
// 8 bits is at most 64*255 = 16320 and fits in 14 bits.
// The block size, window size, range and PE count follow the document; the
// bit widths follow from them.
package me_pkg;

  localparam int unsigned PIX_W   = 8;   // pixel width
  localparam int unsigned BLK     = 8;   // down-sampled block edge (8x8)
  localparam int unsigned WIN     = 24;  // down-sampled search window edge
  localparam int unsigned BANK_ROWS = 12; // rows per reference bank (24x12x2)
  localparam int unsigned NUM_PE  = 8;   // processing elements of ME coarse
  localparam int unsigned SAD_W   = 14;  // ceil(log2(64*255+1))
  localparam int unsigned MV_W    = 4;   // search range -8 .. +7

  typedef logic [PIX_W-1:0]        pix_t;
  typedef logic [SAD_W-1:0]        sad_t;
  typedef logic signed [MV_W-1:0]  mvc_t;

  typedef struct packed {
    mvc_t y;
    mvc_t x;
  } mv_t;

  // Largest representable SAD, used as "no candidate yet".
  localparam sad_t SAD_INF = '1;

  // One entry of the neighbour store: the result of an earlier macroblock.
  typedef struct packed {
    mv_t  mv;
    sad_t sad;
  } mb_result_t;

  // Bus register map of the ME unit (word addresses).
  localparam logic [2:0] REG_CTRL   = 3'd0; // W: bit0 start, bit1 new frame
  localparam logic [2:0] REG_MBPOS  = 3'd1; // RW: [7:0] mb x, [15:8] mb y
  localparam logic [2:0] REG_STATUS = 3'd2; // R: bit0 busy, bit1 done, bit2 skip
  localparam logic [2:0] REG_RESULT = 3'd3; // R: [3:0] mv x, [11:8] mv y, [29:16] SAD
  localparam logic [2:0] REG_COUNT  = 3'd4; // R: [15:0] skipped MBs, [31:16] searched MBs

endpackage
