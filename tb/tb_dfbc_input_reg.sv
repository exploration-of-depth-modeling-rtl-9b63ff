// tb_dfbc_input_reg: the input register against a byte memory model.  It is
// pointed at random bit addresses and drained with random take counts; every
// bit it presents must be the next bit of the memory's bitstream (first bit
// in bit 7), and bit_pos must track the consumed bits.  A last phase drains
// 4 bits per cycle (a 16 x 16 row ICode) and checks that the register keeps up.
module tb_dfbc_input_reg;
  import dfbc_pkg::*;

  localparam int unsigned AW = BYTE_AW;
  localparam int unsigned MB = 1 << AW;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             init = 1'b0, fetch_en = 1'b0;
  logic [AW+2:0]    init_bit = '0;
  logic             mem_rd_en;
  logic [AW-1:0]    mem_addr;
  logic [7:0]       mem_rd_data;
  logic [15:0]      bits;
  logic [4:0]       avail;
  logic [2:0]       take = '0;
  logic [AW+2:0]    bit_pos;
  logic [7:0]       mem [MB];
  int checks = 0, failures = 0;
  int pos;

  dfbc_input_reg dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (mem_rd_en) mem_rd_data <= mem[mem_addr];

  function automatic bit stream_bit(int p);
    return mem[(p >> 3) % MB][7 - (p % 8)];
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Consume k bits this cycle after checking them.
  task automatic consume(input int k);
    for (int i = 0; i < k; i++)
      check(bits[15-i] == stream_bit(pos + i), $sformatf("bit %0d", pos + i));
    check(int'(bit_pos) == pos, "bit_pos");
    take = 3'(k);
    pos += k;
  endtask

  initial begin
    for (int a = 0; a < int'(MB); a++) mem[a] = 8'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 300; run++) begin
      @(negedge clk);
      pos = int'($urandom_range(0, (MB - 64) * 8));
      init = 1'b1; init_bit = (AW+3)'(pos); take = '0; fetch_en = 1'b0;
      @(negedge clk);
      init = 1'b0;
      for (int cyc = 0; cyc < 60; cyc++) begin
        int k;
        k = int'($urandom_range(0, 5));
        fetch_en = ($urandom_range(0, 7) != 0);
        if (k > int'(avail)) k = int'(avail);
        consume(k);
        @(negedge clk);
        take = '0;
      end
    end
    // rate: 4 bits per cycle sustained
    @(negedge clk);
    pos = 1234; init = 1'b1; init_bit = (AW+3)'(pos); fetch_en = 1'b1; take = '0;
    @(negedge clk);
    init = 1'b0;
    while (avail < 4) @(negedge clk);
    begin
      longint t0, ncy;
      t0 = $time;
      for (int i = 0; i < 100; i++) begin
        while (avail < 4) begin take = '0; @(negedge clk); end
        consume(4);
        @(negedge clk);
        take = '0;
      end
      ncy = ($time - t0) / 10;
      check(ncy <= 102, $sformatf("100 ICodes of 4 bits took %0d cycles", ncy));
    end
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
