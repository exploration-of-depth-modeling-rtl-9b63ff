// tb_ci_row_inverter: random PattMem rows, AuxB, AuxCol, row numbers and block
// sizes; the expected row is rebuilt bit by bit from the first-column rule
// (value AuxB down to row AuxCol, the other value below).
module tb_ci_row_inverter;
  import dfbc_pkg::*;

  row_t      patt, row_out;
  logic      aux_b;
  icode_t    aux_col, row_blk;
  blk_size_e blk;
  int checks = 0, failures = 0;

  ci_row_inverter dut (.*);

  initial begin
    for (int i = 0; i < 5000; i++) begin
      int  n;
      row_t exp;
      logic first;
      patt    = row_t'($urandom);
      aux_b   = 1'($urandom);
      aux_col = icode_t'($urandom);
      row_blk = icode_t'($urandom);
      case ($urandom_range(0, 3))
        0: blk = BLK_4X4;
        1: blk = BLK_8X8;
        2: blk = BLK_16X16;
        default: blk = BLK_32X32;
      endcase
      n = (blk == BLK_4X4) ? 4 : (blk == BLK_8X8) ? 8 : 16;
      first = (int'(row_blk) > int'(aux_col)) ? !aux_b : aux_b;
      for (int c = 0; c < 16; c++)
        exp[c] = (c < n) ? (first ? !patt[c] : patt[c]) : 1'b0;
      #1;
      checks++;
      if (row_out !== exp) begin
        failures++;
        if (failures < 10)
          $display("FAIL b=%0d col=%0d row=%0d n=%0d patt=%04h got %04h exp %04h",
                   aux_b, aux_col, row_blk, n, patt, row_out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
