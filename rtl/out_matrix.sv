// out_matrix: the output matrix (OutMatrix) that collects decoded rows.
//
// NMAX x NMAX flip-flops.  clr zeroes the whole matrix (start of a wedgelet).
// wr_en writes wr_data into row wr_row.  With wr_fill also set, the same row
// is written into every row from wr_row to the last row of the block: this
// restores in one cycle the ending rows that the ERR coding left out.  A block
// of N < NMAX rows uses rows 0..N-1.  Writes take effect at the clock edge;
// the matrix is read in parallel on mat.
module out_matrix
  import dfbc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clr,
  input  logic      wr_en,
  input  logic      wr_fill,
  input  icode_t    wr_row,
  input  blk_size_e blk,
  input  row_t      wr_data,
  output row_t      mat [NMAX]
);

  logic [4:0] n_rows;
  assign n_rows = 5'(1) << icode_len(blk);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(NMAX); r++) mat[r] <= '0;
    end else if (clr) begin
      for (int r = 0; r < int'(NMAX); r++) mat[r] <= '0;
    end else if (wr_en) begin
      for (int r = 0; r < int'(NMAX); r++) begin
        if (r == int'(wr_row) ||
            (wr_fill && r > int'(wr_row) && r < int'(n_rows)))
          mat[r] <= wr_data;
      end
    end
  end

endmodule
