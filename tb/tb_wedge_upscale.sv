// tb_wedge_upscale: random matrices read row by row for every block size;
// 32 x 32 rows must be the 16 x 16 rows with every bit doubled and every row
// repeated, smaller sizes the stored row limited to N columns and N rows.
module tb_wedge_upscale;
  import dfbc_pkg::*;

  row_t        mat [NMAX];
  blk_size_e   blk;
  logic [4:0]  rd_row;
  logic [31:0] rd_data;
  int checks = 0, failures = 0;

  wedge_upscale dut (.*);

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int r = 0; r < 16; r++) mat[r] = row_t'($urandom);
      for (int s = 2; s <= 5; s++) begin
        automatic int n = 1 << s;
        blk = blk_size_e'(s);
        for (int y = 0; y < 32; y++) begin
          automatic logic [31:0] exp = '0;
          rd_row = 5'(y);
          if (n == 32) begin
            for (int c = 0; c < 32; c++) exp[c] = mat[y >> 1][c >> 1];
          end else if (y < n) begin
            for (int c = 0; c < n; c++) exp[c] = mat[y][c];
          end
          #1;
          checks++;
          if (rd_data !== exp) begin
            failures++;
            if (failures < 10) $display("FAIL n=%0d y=%0d got %08h exp %08h",
                                        n, y, rd_data, exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
