// tb_dfbc_decoder: the complete D-FB&C+ decoder reading a byte memory model
// that holds reference-coded random wedgelets of 4x4, 8x8 and 16x16 blocks
// back to back.  Each wedgelet is decoded either from its bit address or as
// the continuation of the previous one; the output matrix must equal the
// generated pattern (zeros outside the block), next_bit must point at the
// next code and the decode must finish within stored_rows + 6 cycles (three
// of them fetch the first byte when the decode does not continue).
module tb_dfbc_decoder;
  import dfbc_pkg::*;
  import dfbc_ref_pkg::*;

  localparam int unsigned AW = BYTE_AW;
  localparam int NW = 300;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          start = 1'b0, cont = 1'b0;
  blk_size_e     blk = BLK_4X4, blk_out;
  logic [AW+2:0] start_bit = '0, next_bit;
  logic          busy, done;
  logic [4:0]    rows_stored;
  logic          mem_rd_en;
  logic [AW-1:0] mem_addr;
  logic [7:0]    mem_rd_data;
  row_t          mat [NMAX];
  logic [7:0]    mem [1 << AW];
  int checks = 0, failures = 0;

  dfbc_decoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (mem_rd_en) mem_rd_data <= mem[mem_addr];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    pat_t p [NW];
    int   ns [NW], starts [NW];
    bit   q [$];
    logic [7:0] b [$];
    int   n, nrows, cyc, n_err = 0, n_cont = 0;
    for (int a = 0; a < (1 << AW); a++) mem[a] = 8'($urandom);
    for (int w = 0; w < NW; w++) begin
      ns[w] = 4 << $urandom_range(0, 2);
      gen_wedge(ns[w], p[w]);
      starts[w] = q.size();
      void'(encode(p[w], ns[w], q));
    end
    pack_bytes(q, b);
    foreach (b[i]) mem[i] = b[i];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < NW; w++) begin
      n = ns[w];
      nrows = stored_rows(p[w], n);
      if (nrows < n) n_err++;
      @(negedge clk);
      start = 1'b1;
      cont  = (w > 0) && ($urandom_range(0, 1) == 1);
      if (cont) n_cont++;
      start_bit = (AW+3)'(starts[w]);
      blk = blk_size_e'($clog2(n));
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!done && cyc < 100) begin @(negedge clk); cyc++; end
      check(done, $sformatf("w%0d done", w));
      check(cyc <= nrows + 6, $sformatf("w%0d took %0d cycles for %0d rows", w, cyc, nrows));
      for (int r = 0; r < 16; r++)
        check(mat[r] === p[w][r], $sformatf("w%0d n=%0d row %0d: got %04h exp %04h",
                                            w, n, r, mat[r], p[w][r]));
      check(int'(next_bit) == ((w + 1 < NW) ? starts[w+1] : q.size()), "next_bit");
      check(int'(rows_stored) == nrows, "rows_stored");
      // pattern holds until the next start
      repeat ($urandom_range(0, 3)) @(negedge clk);
      check(mat[0] === p[w][0] && mat[n-1] === p[w][n-1], "pattern held");
    end
    check(n_err > 0 && n_cont > 0, "ending rows removal and continuation used");
    // Worked 8x8 example: rows 00000011, 00001111, 00111111, then five rows
    // of ones; its 16-bit code is 0 010 101 011 001 111 (first bit, column
    // change after row 2, row changes after columns 5, 3, 1, then a uniform
    // row that ends the pattern).
    begin
      automatic row_t exp [8] = '{16'h00C0, 16'h00F0, 16'h00FC, 16'h00FF,
                                  16'h00FF, 16'h00FF, 16'h00FF, 16'h00FF};
      automatic bit   ex [$];
      automatic pat_t pe;
      mem[8000] = 8'b0010_1010;
      mem[8001] = 8'b1100_1111;
      for (int r = 0; r < 16; r++) pe[r] = (r < 8) ? exp[r] : '0;
      check(encode(pe, 8, ex) == 16, "reference coder gives 16 bits for the example");
      @(negedge clk);
      start = 1'b1; cont = 1'b0; blk = BLK_8X8; start_bit = (AW+3)'(8000 * 8);
      @(negedge clk);
      start = 1'b0;
      while (!done) @(negedge clk);
      for (int r = 0; r < 16; r++)
        check(mat[r] === ((r < 8) ? exp[r] : 16'h0000), $sformatf("example row %0d", r));
      check(rows_stored == 5'd4, "example: 4 rows stored");
      check(int'(next_bit) == 8000 * 8 + 16, "example: 16 bits consumed");
    end
    $display("decoded %0d wedgelets, %0d with ending rows removed, %0d continued",
             NW, n_err, n_cont);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
