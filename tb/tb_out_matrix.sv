// tb_out_matrix: random single-row writes, fills (row copied down to the
// last row of the block) and clears, checked against a model matrix after
// every clock.
module tb_out_matrix;
  import dfbc_pkg::*;

  logic      clk = 1'b0, rst_n = 1'b0;
  logic      clr = 1'b0, wr_en = 1'b0, wr_fill = 1'b0;
  icode_t    wr_row = '0;
  blk_size_e blk = BLK_16X16;
  row_t      wr_data = '0;
  row_t      mat [NMAX];
  row_t      model [NMAX];
  int checks = 0, failures = 0, fills = 0;

  out_matrix dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int r = 0; r < 16; r++) model[r] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      int n;
      @(negedge clk);
      case ($urandom_range(0, 3))
        0: blk = BLK_4X4;
        1: blk = BLK_8X8;
        2: blk = BLK_16X16;
        default: blk = BLK_32X32;
      endcase
      n = (blk == BLK_4X4) ? 4 : (blk == BLK_8X8) ? 8 : 16;
      clr     = ($urandom_range(0, 19) == 0);
      wr_en   = 1'($urandom);
      wr_fill = 1'($urandom);
      wr_row  = icode_t'($urandom_range(0, n - 1));
      wr_data = row_t'($urandom);
      if (clr) begin
        for (int r = 0; r < 16; r++) model[r] = '0;
      end else if (wr_en) begin
        model[wr_row] = wr_data;
        if (wr_fill) begin
          fills++;
          for (int r = int'(wr_row) + 1; r < n; r++) model[r] = wr_data;
        end
      end
      @(posedge clk); #1;
      for (int r = 0; r < 16; r++) begin
        checks++;
        if (mat[r] !== model[r]) begin
          failures++;
          if (failures < 10) $display("FAIL step %0d row %0d: got %04h exp %04h",
                                      i, r, mat[r], model[r]);
        end
      end
    end
    checks++;
    if (fills == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
