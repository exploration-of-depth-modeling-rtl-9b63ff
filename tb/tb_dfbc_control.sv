// tb_dfbc_control: the control unit fed by a behavioural input register that
// serves a bitstream of reference-coded wedgelets (random sizes, random
// straight lines) and offers a random number of bits each cycle.  For every
// wedgelet it checks AuxB, AuxCol, the sequence of (row, AddressReg) writes,
// the fill flag on the last stored row when ending rows were removed,
// rows_stored, the clear on start and the done pulse.  With every bit always
// available it also checks the latency: done comes stored_rows + 2 cycles
// after start.
module tb_dfbc_control;
  import dfbc_pkg::*;
  import dfbc_ref_pkg::*;

  localparam int unsigned AW = BYTE_AW;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          start = 1'b0, cont = 1'b0;
  blk_size_e     blk = BLK_8X8;
  logic [AW+2:0] start_bit = '0;
  logic          busy, done;
  logic [4:0]    rows_stored;
  logic          rd_init, rd_fetch_en;
  logic [15:0]   rd_bits;
  logic [4:0]    rd_avail;
  logic [2:0]    rd_take;
  blk_size_e     blk_q;
  logic          aux_b, wr_en, wr_fill, mat_clr;
  icode_t        aux_col, addr_reg, wr_row;

  dfbc_control dut (.*);

  always #5 clk = ~clk;

  bit  stream [$];
  int  pos = 0;           // next bit the behavioural register serves
  bit  full_avail = 1'b0;
  int  checks = 0, failures = 0, n_fill = 0, n_full = 0, n_cont = 0;

  // behavioural input register
  always_comb begin
    int left;
    left = stream.size() - pos;
    if (left < 0) left = 0;
    for (int i = 0; i < 16; i++)
      rd_bits[15-i] = (pos + i < stream.size()) ? stream[pos + i] : 1'b0;
    rd_avail = full_avail ? 5'(left > 16 ? 16 : left)
                          : 5'(left > 16 ? 16 : left) & 5'($urandom_range(0, 31));
  end
  always @(posedge clk) begin
    if (rd_init) pos <= int'(start_bit);
    else         pos <= pos + int'(rd_take);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    pat_t p [200];
    int   ns [200], starts [200];
    int   n, len, nrows;
    longint t_start, t_done;
    logic col [16];
    logic row [16];
    // build the bitstream
    for (int w = 0; w < 200; w++) begin
      ns[w] = 4 << $urandom_range(0, 2);
      gen_wedge(ns[w], p[w]);
      starts[w] = stream.size();
      void'(encode(p[w], ns[w], stream));
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 200; w++) begin
      n = ns[w];
      len = $clog2(n);
      nrows = stored_rows(p[w], n);
      full_avail = (w % 3 == 0);
      @(negedge clk);
      start = 1'b1;
      cont  = (w > 0) && ($urandom_range(0, 1) == 1);
      if (cont) n_cont++;
      start_bit = (AW+3)'(starts[w]);
      blk = (n == 16 && $urandom_range(0, 1) == 1) ? BLK_32X32 : blk_size_e'(len);
      #1 check(mat_clr == 1'b1, "mat_clr on start");
      t_start = $time;
      @(negedge clk);
      start = 1'b0;
      check(busy, "busy after start");
      for (int r = 0; r < 16; r++) col[r] = (r < n) ? p[w][r][0] : 1'b0;
      for (int r = 0; r < nrows; r++) begin
        int code;
        while (!wr_en) @(negedge clk);
        for (int c = 0; c < 16; c++) row[c] = (c < n) ? p[w][r][c] : 1'b0;
        code = line_code(row, n);
        check(int'(wr_row) == r, $sformatf("w%0d row index %0d got %0d", w, r, wr_row));
        check(int'(addr_reg) == code, $sformatf("w%0d row %0d AddressReg %0d exp %0d", w, r, addr_reg, code));
        check(aux_b == p[w][0][0], "AuxB");
        check(int'(aux_col) == line_code(col, n), "AuxCol");
        check(wr_fill == (r == nrows - 1 && nrows < n), $sformatf("w%0d fill flag row %0d", w, r));
        if (wr_fill) n_fill++;
        if (r == nrows - 1 && nrows == n) n_full++;
        @(negedge clk);
      end
      check(done == 1'b1, $sformatf("w%0d done after last write", w));
      t_done = $time;
      if (full_avail && !cont)
        check((t_done - t_start) / 10 == nrows + 2,
              $sformatf("latency %0d cycles, %0d rows", (t_done - t_start) / 10, nrows));
      check(int'(rows_stored) == nrows, "rows_stored");
      check(!busy, "idle after done");
      check(pos == starts[w] + 1 + len * (nrows + 1), "bits consumed");
    end
    check(n_fill > 0 && n_full > 0 && n_cont > 0, "ERR, full and continued wedgelets all seen");
    $display("wedgelets with ending rows removed: %0d, complete: %0d, continued: %0d",
             n_fill, n_full, n_cont);
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
