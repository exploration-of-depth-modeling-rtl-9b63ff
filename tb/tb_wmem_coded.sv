// tb_wmem_coded: checks the coded WMem: bytes written through the load port
// are read back one cycle after the read request, and the read data holds
// while no read is requested.
module tb_wmem_coded;
  import dfbc_pkg::*;

  localparam int unsigned AW = $clog2(WMEM_BYTES);

  logic          clk = 1'b0;
  logic          wr_en = 1'b0, rd_en = 1'b0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [7:0]    wr_data = '0, rd_data;
  logic [7:0]    model [WMEM_BYTES];
  int checks = 0, failures = 0;

  wmem_coded dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    // fill the whole memory, keep a model
    for (int a = 0; a < int'(WMEM_BYTES); a++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = AW'(a); wr_data = 8'($urandom);
      model[a] = wr_data;
    end
    @(negedge clk) wr_en = 1'b0;
    // random reads, each checked one cycle later
    for (int i = 0; i < 2000; i++) begin
      automatic int a = (i < 2) ? (i == 0 ? 0 : int'(WMEM_BYTES) - 1)
                      : int'($urandom_range(0, WMEM_BYTES - 1));
      @(negedge clk); rd_en = 1'b1; rd_addr = AW'(a);
      @(negedge clk); rd_en = 1'b0;
      check(rd_data, model[a], $sformatf("read %0d", a));
      rd_addr = AW'($urandom_range(0, WMEM_BYTES - 1));
      @(negedge clk);
      check(rd_data, model[a], "hold without rd_en");
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
