// tb_dfbc_wedgelet_store: end-to-end test of the compressed wedgelet store at
// its default size.
//
// Builds wedgelet lists from random straight lines and codes them with the
// reference coder into three byte-aligned regions of the coded WMem, each
// filled up to the D-FB&C+ size of that block size's DMM-1 list (888, 16,150
// and 21,930 bits) or to the list length (86, 802, 510 patterns), whichever
// comes first.  It loads the WMem through its load port and then:
//  1. walks each list as a DMM-1 encoder does: the first wedgelet from its
//     region address, every next one with cont;
//  2. decodes random wedgelets by bit address, as a DMM-1 decoder would;
//  3. decodes every 16x16 wedgelet as a 32x32 block and reads the upscaled
//     rows.
// Every decoded matrix and every row read through the row port is compared
// with the reference.  The test counts how often each mechanism happened
// (ending rows removed, complete patterns, inverted rows, rows below the
// first-column change, ICodes split across two bytes, continued and
// addressed decodes, 32x32 upscaling) and fails if one never did.
module tb_dfbc_wedgelet_store;
  import dfbc_pkg::*;
  import dfbc_ref_pkg::*;

  localparam int unsigned AW = $clog2(WMEM_BYTES);
  localparam int NLIST [3]  = '{86, 802, 510};
  localparam int BUDGET [3] = '{888, 16150, 21930};
  int NSIZE [3];

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
  int n_err = 0, n_full = 0, n_inv = 0, n_below = 0, n_split = 0;
  int n_cont = 0, n_addr = 0, n_up = 0;
  int n_size [4] = '{0, 0, 0, 0};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  pat_t pats [3][$];
  int   starts [3][$];        // absolute bit address of each code
  int   ends [3][$];          // bit address after each code
  bit   q [3][$];

  // Decode one wedgelet and check it; returns the cycles from start to done.
  task automatic decode(input int s, input int w, input bit use_cont, input bit up);
    int   n = 4 << s;
    int   nrows = stored_rows(pats[s][w], n);
    int   cyc = 0;
    logic col [16];
    @(negedge clk);
    start = 1'b1;
    cont  = use_cont;
    blk   = up ? BLK_32X32 : blk_size_e'(s + 2);
    start_bit = (AW+3)'(starts[s][w]);
    @(negedge clk);
    start = 1'b0;
    while (!done && cyc < 200) begin @(negedge clk); cyc++; end
    check(done, $sformatf("size %0d wedgelet %0d done", n, w));
    check(int'(rows_stored) == nrows, "rows_stored");
    check(int'(next_bit) == ends[s][w], $sformatf("next_bit %0d exp %0d", next_bit, ends[s][w]));
    for (int r = 0; r < 16; r++)
      check(mat[r] === pats[s][w][r], $sformatf("size %0d w%0d row %0d got %04h exp %04h",
                                                n, w, r, mat[r], pats[s][w][r]));
    // row port
    for (int y = 0; y < 32; y++) begin
      logic [31:0] exp = '0;
      rd_row = 5'(y);
      if (up) for (int c = 0; c < 32; c++) exp[c] = pats[s][w][y >> 1][c >> 1];
      else if (y < n) exp[15:0] = pats[s][w][y];
      #1 check(rd_data === exp, $sformatf("row port n=%0d up=%0d y=%0d", n, up, y));
    end
    // mechanism counters
    if (nrows < n) n_err++; else n_full++;
    for (int r = 0; r < 16; r++) col[r] = (r < n) ? pats[s][w][r][0] : 1'b0;
    for (int r = 0; r < nrows; r++) begin
      if (pats[s][w][r][0]) n_inv++;
      if (r > line_code(col, n)) n_below++;
    end
    begin
      int len = s + 2;
      // ICodes of this wedgelet that straddle a byte boundary
      for (int k = 0; k <= nrows; k++) begin
        int b0 = starts[s][w] + 1 + k * len;
        if ((b0 >> 3) != ((b0 + len - 1) >> 3)) n_split++;
      end
    end
    if (use_cont) n_cont++; else n_addr++;
    if (up) n_up++;
    n_size[up ? 3 : s]++;
  endtask

  initial begin
    int base [3];
    int total_bytes = 0;
    logic [7:0] bytes [$];
    logic [7:0] image [$];
    // build and code the lists
    for (int s = 0; s < 3; s++) begin
      base[s] = total_bytes * 8;
      NSIZE[s] = 0;
      while (NSIZE[s] < NLIST[s]) begin
        pat_t p;
        bit   t [$];
        t.delete();
        gen_wedge(4 << s, p);
        void'(encode(p, 4 << s, t));
        if (q[s].size() + t.size() > BUDGET[s]) break;
        pats[s].push_back(p);
        starts[s].push_back(base[s] + q[s].size());
        foreach (t[i]) q[s].push_back(t[i]);
        ends[s].push_back(base[s] + q[s].size());
        NSIZE[s]++;
      end
      pack_bytes(q[s], bytes);
      // regions start on the byte boundaries of the full-size lists
      while (bytes.size() < (BUDGET[s] + 7) / 8) bytes.push_back(8'h00);
      foreach (bytes[i]) image.push_back(bytes[i]);
      total_bytes += bytes.size();
      $display("size %0dx%0d: %0d wedgelets, %0d coded bits (%0d uncoded), region %0d bytes",
               4 << s, 4 << s, NSIZE[s], q[s].size(), NSIZE[s] * (16 << (2 * s)), bytes.size());
    end
    $display("coded image %0d bytes, WMem %0d bytes", total_bytes, WMEM_BYTES);
    check(total_bytes == int'(WMEM_BYTES), "regions fill the WMem exactly");
    // load the WMem
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (image[i]) begin
      if (i >= int'(WMEM_BYTES)) break;
      @(negedge clk);
      load_en = 1'b1; load_addr = AW'(i); load_data = image[i];
    end
    @(negedge clk) load_en = 1'b0;
    // 1. sequential walk of every list
    for (int s = 0; s < 3; s++) begin
      longint t0, t1;
      t0 = $time;
      for (int w = 0; w < NSIZE[s]; w++) decode(s, w, w > 0, 1'b0);
      t1 = $time;
      $display("size %0dx%0d list decoded in %0d cycles (row port checks included)",
               4 << s, 4 << s, (t1 - t0) / 10);
    end
    // 2. random access
    for (int i = 0; i < 300; i++) begin
      automatic int s = int'($urandom_range(0, 2));
      decode(s, int'($urandom_range(0, NSIZE[s] - 1)), 1'b0, 1'b0);
    end
    // 3. 32x32 through the 16x16 list
    for (int w = 0; w < NSIZE[2]; w++) decode(2, w, w > 0, 1'b1);
    // a start while busy is ignored
    @(negedge clk);
    start = 1'b1; cont = 1'b0; blk = BLK_8X8; start_bit = (AW+3)'(starts[1][0]);
    @(negedge clk);
    start_bit = (AW+3)'(starts[1][1]);
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    for (int r = 0; r < 16; r++) check(mat[r] === pats[1][0][r], "start while busy ignored");

    $display("ending rows removed %0d, complete %0d, inverted rows %0d, rows below column change %0d",
             n_err, n_full, n_inv, n_below);
    $display("split ICodes %0d, continued %0d, addressed %0d, upscaled %0d",
             n_split, n_cont, n_addr, n_up);
    check(n_err > 0,   "ending rows removal happened");
    check(n_full > 0,  "complete pattern happened");
    check(n_inv > 0,   "row inversion happened");
    check(n_below > 0, "row below first-column change happened");
    check(n_split > 0, "ICode split across bytes happened");
    check(n_cont > 0 && n_addr > 0, "continued and addressed decodes happened");
    check(n_up > 0,    "32x32 upscaling happened");
    for (int s = 0; s < 4; s++) check(n_size[s] > 0, "every block size decoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
