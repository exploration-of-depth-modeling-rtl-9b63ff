// tb_patt_mem: checks every PattMem entry: entry a must be zeros up to
// column a and ones after it, worked out here as the complement of a
// low-bit mask.
module tb_patt_mem;
  import dfbc_pkg::*;

  icode_t addr;
  row_t   data;
  int checks = 0, failures = 0;

  patt_mem dut (.addr, .data);

  initial begin
    for (int a = 0; a < 16; a++) begin
      automatic row_t exp = ~row_t'((32'd2 << a) - 1);
      addr = icode_t'(a);
      #1;
      checks++;
      if (data !== exp) begin
        failures++;
        $display("FAIL entry %0d: got %04h expected %04h", a, data, exp);
      end
    end
    // entry 7 as printed for an 8-column row: 0000_0000 (no change)
    addr = 4'd7; #1; checks++;
    if (data[7:0] !== 8'h00) failures++;
    // entry 0: 0 followed by ones
    addr = 4'd0; #1; checks++;
    if (data !== 16'hFFFE) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
