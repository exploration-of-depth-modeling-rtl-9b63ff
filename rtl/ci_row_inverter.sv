// ci_row_inverter: the controlled inverters (ci) and their control (cci).
//
// A PattMem row always starts with 0.  The real first bit of a decoded row is
// the first-column value at that row: the block's top-left bit (AuxB) for rows
// 0..AuxCol, its complement below, where AuxCol is the first-column ICode.
// cci computes that first bit; when it is 1 every ci inverts its bit, else the
// row passes unchanged.  Columns outside the block are forced to 0 so that a
// smaller block sits clean in the top-left corner of the 16 x 16 OutMatrix
// (this masking is this design's choice).  Purely combinational.
module ci_row_inverter
  import dfbc_pkg::*;
(
  input  row_t      patt,      // PattMem output
  input  logic      aux_b,     // top-left bit of the block
  input  icode_t    aux_col,   // first-column ICode
  input  icode_t    row_blk,   // row being decoded (rowBlock)
  input  blk_size_e blk,
  output row_t      row_out
);

  logic inv;   // cci output: first bit of this row

  always_comb begin
    inv     = (row_blk <= aux_col) ? aux_b : ~aux_b;
    row_out = (patt ^ {NMAX{inv}}) & col_mask(blk);
  end

endmodule
