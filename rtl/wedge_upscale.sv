// wedge_upscale: row read port of the decoded wedgelet, with 32 x 32 upscaling.
//
// 32 x 32 wedgelets are not stored: each is the 16 x 16 wedgelet of the same
// index scaled up by two in both directions.  For a 32 x 32 block, row y of
// the result is row y/2 of the 16 x 16 matrix with every bit doubled
// (column c takes bit c/2).  For the stored sizes (4, 8, 16) row y is read
// straight from the matrix, and rows at or beyond N read as zero.  Bit c of
// rd_data is column c.  Combinational: rd_data follows rd_row and the matrix
// in the same cycle.  The nearest-neighbour doubling is this design's reading
// of "upscaling".
module wedge_upscale
  import dfbc_pkg::*;
(
  input  row_t              mat [NMAX],
  input  blk_size_e         blk,
  input  logic [4:0]        rd_row,
  output logic [2*NMAX-1:0] rd_data
);

  always_comb begin
    rd_data = '0;
    if (blk == BLK_32X32) begin
      for (int c = 0; c < int'(2*NMAX); c++)
        rd_data[c] = mat[rd_row[4:1]][c/2];
    end else if (rd_row < (5'd1 << icode_len(blk))) begin
      rd_data[NMAX-1:0] = mat[rd_row[3:0]] & col_mask(blk);
    end
  end

endmodule
