// dfbc_pkg: constants and types shared by the D-FB&C+ wedgelet decoder.
//
// A DMM-1 wedgelet is an N x N binary pattern split by one straight line, so
// every row and every column changes value at most once.  D-FB&C+ stores a
// wedgelet as: the top-left bit, one ICode (log2(N) bits) for the position
// of the change in the first column, then one ICode per row for the position
// of the change in that row; trailing rows that are all-equal copies of the
// last stored row are not stored ("ending rows removal").  An ICode value c
// means the bits after position c (0-based column c) take the other value;
// c = N-1 means the line has no change.
//
// The largest pattern decoded is 16 x 16 (32 x 32 wedgelets are 16 x 16 ones
// upscaled), so ICodes are at most 4 bits.  The coded WMem size is this
// design's choice, one byte-aligned region per block size.  The 8x8 and 16x16
// regions are the published D-FB&C+ sizes (16,150 and 21,930 bits) rounded up
// to bytes.  The 4x4 region is 111 bytes, not the 101 bytes of the published
// 808 bits: the 86-entry 4x4 list of the reference software, coded with this
// design's ending-rows rule, takes 888 bits.
package dfbc_pkg;

  localparam int unsigned NMAX       = 16;              // OutMatrix is NMAX x NMAX
  localparam int unsigned LMAX       = 4;               // log2(NMAX): widest ICode
  localparam int unsigned WMEM_BYTES = 111 + 2019 + 2742; // 4x4, 8x8, 16x16 regions in bytes
  localparam int unsigned BYTE_AW    = $clog2(WMEM_BYTES);

  // Block size, encoded as log2(N).
  typedef enum logic [2:0] {
    BLK_4X4   = 3'd2,
    BLK_8X8   = 3'd3,
    BLK_16X16 = 3'd4,
    BLK_32X32 = 3'd5
  } blk_size_e;

  typedef logic [NMAX-1:0] row_t;      // bit c is column c (c = 0 leftmost)
  typedef logic [LMAX-1:0] icode_t;

  // ICode width of the stored pattern: 32 x 32 blocks use the 16 x 16 data.
  function automatic logic [2:0] icode_len(blk_size_e s);
    return (s == BLK_32X32) ? 3'd4 : 3'(s);
  endfunction

  // Mask of the columns that belong to a stored block of the given size.
  function automatic row_t col_mask(blk_size_e s);
    row_t m;
    for (int c = 0; c < int'(NMAX); c++)
      m[c] = (c < (1 << icode_len(s)));
    return m;
  endfunction

endpackage
