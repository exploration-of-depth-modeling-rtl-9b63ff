// tb_dfbc_htm_list: workload test with the real 4x4 DMM-1 wedgelet list.
//
// Generates the 4x4 list the way the 3D-HEVC test model does (half-pel
// resolution, see wedge_list in dfbc_ref_pkg), checks that it has 86 entries and that its
// D-FB&C size without ending rows removal is 86 x 11 = 946 bits, codes it
// with the reference D-FB&C+ coder, and checks that the code fits the 4x4
// region of the coded WMem (the first 111 bytes).  The code is loaded into
// the top at its default size and the whole list is decoded in order, the
// first wedgelet by bit address and the rest with cont, as a DMM-1 encoder
// scans it.  Every matrix, rows_stored and next_bit are compared, and the
// cycles for the whole scan are reported and bounded by the stored rows
// plus three cycles per wedgelet (header, last-row write, and the cycle in
// which done is seen and the next start is presented) plus the start-up fetch.
module tb_dfbc_htm_list;
  import dfbc_pkg::*;
  import dfbc_ref_pkg::*;

  localparam int unsigned AW = $clog2(WMEM_BYTES);
  localparam int REGION_4X4 = 111;          // bytes of the 4x4 region

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              load_en = 1'b0;
  logic [AW-1:0]     load_addr = '0;
  logic [7:0]        load_data = '0;
  logic              start = 1'b0, cont = 1'b0;
  blk_size_e         blk = BLK_4X4;
  logic [AW+2:0]     start_bit = '0, next_bit;
  logic              busy, done;
  logic [4:0]        rows_stored;
  row_t              mat [NMAX];
  logic [4:0]        rd_row = '0;
  logic [2*NMAX-1:0] rd_data;

  dfbc_wedgelet_store dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    pat_t       lst [$];
    bit         q [$];
    logic [7:0] bytes [$];
    int         ends [$];
    int         rows_total, n_err, cycles;
    rows_total = 0; n_err = 0; cycles = 0;

    wedge_list(4, RES_HALF, lst);
    $display("4x4 list: %0d wedgelets", lst.size());
    check(lst.size() == 86, "4x4 list has 86 wedgelets");
    check(lst.size() * 11 == 946, "D-FB&C size of the 4x4 list is 946 bits");
    foreach (lst[i]) begin
      void'(encode(lst[i], 4, q));
      ends.push_back(q.size());
      rows_total += stored_rows(lst[i], 4);
      if (stored_rows(lst[i], 4) < 4) n_err++;
    end
    pack_bytes(q, bytes);
    $display("D-FB&C+ code: %0d bits, %0d bytes; %0d of %0d wedgelets lose ending rows",
             q.size(), bytes.size(), n_err, lst.size());
    check(bytes.size() <= REGION_4X4, "4x4 code fits its WMem region");
    check(n_err > 0, "ending rows removal happened");

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (bytes[i]) begin
      @(negedge clk);
      load_en = 1'b1; load_addr = AW'(i); load_data = bytes[i];
    end
    @(negedge clk) load_en = 1'b0;

    foreach (lst[w]) begin
      automatic int cyc;
      start = 1'b1;
      cont  = (w > 0);
      blk   = BLK_4X4;
      start_bit = '0;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!done && cyc < 100) begin @(negedge clk); cyc++; end
      cycles += cyc;
      check(done, $sformatf("wedgelet %0d done", w));
      check(int'(rows_stored) == stored_rows(lst[w], 4), $sformatf("wedgelet %0d rows_stored", w));
      check(int'(next_bit) == ends[w], $sformatf("wedgelet %0d next_bit", w));
      for (int r = 0; r < 16; r++)
        check(mat[r] === lst[w][r], $sformatf("wedgelet %0d row %0d got %04h exp %04h",
                                              w, r, mat[r], lst[w][r]));
    end
    $display("whole list decoded in %0d cycles (%0d stored rows)", cycles, rows_total);
    check(cycles <= rows_total + 3 * lst.size() + 4, "scan rate");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
