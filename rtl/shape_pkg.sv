// shape_pkg: types and constants shared by the binary-shape encoder.
// A binary alpha block (BAB) is 16x16 one-bit pixels; rows are packed into
// 16-bit words with the leftmost pixel in the MSB. The BAB type codes follow
// the MPEG-4 bab_type table (0..6). The conversion-ratio and block-size
// encodings are this design's own choice.
package shape_pkg;
  localparam int BAB_N = 16;   // BAB width and height in pixels
  localparam int SAD_W = 9;    // 0..256 mismatching pixels

  typedef enum logic [2:0] {
    BAB_MVD0_NOUPD = 3'd0,     // MVDs == 0, no update
    BAB_MVD_NOUPD  = 3'd1,     // MVDs != 0, no update
    BAB_TRANSP     = 3'd2,     // all transparent
    BAB_OPAQUE     = 3'd3,     // all opaque
    BAB_INTRA_CAE  = 3'd4,     // intra CAE
    BAB_MVD0_INTER = 3'd5,     // MVDs == 0, inter CAE
    BAB_MVD_INTER  = 3'd6      // MVDs != 0, inter CAE
  } bab_type_e;

  // Conversion ratio selected by size conversion; also the CAE block size.
  typedef enum logic [1:0] {
    CR_1    = 2'd0,            // 16x16
    CR_1_2  = 2'd1,            // 8x8
    CR_1_4  = 2'd2             // 4x4
  } cr_e;

  typedef enum logic [1:0] {
    CLS_TRANSP   = 2'd0,
    CLS_OPAQUE   = 2'd1,
    CLS_BOUNDARY = 2'd2
  } bab_class_e;

  typedef enum logic {
    VOP_I = 1'b0,
    VOP_P = 1'b1
  } vop_type_e;

  // A whole BAB held in registers: blk[y][x], x = 0 is the leftmost pixel.
  typedef logic [BAB_N-1:0][BAB_N-1:0] bab_t;
endpackage
