// patt_mem: the row pattern table (PattMem) of the D-FB&C+ decoder.
//
// Entry a is the row "0 ... 0 1 ... 1" whose bits 0..a are 0 and whose
// bits a+1..NMAX-1 are 1: the row that starts with 0 and changes value right
// after column a.  Entry NMAX-1 is all zeros (no change).  One table serves
// every block size: a block of N < NMAX columns uses the first N bits, and the
// ICode N-1 then also yields a row without change.  Rows starting with 1 are
// obtained by inverting an entry (ci_row_inverter), which halves the table.
// The table is constant, computed from this rule; the read is combinational,
// addressed by the decoder's AddressReg.
module patt_mem
  import dfbc_pkg::*;
(
  input  icode_t addr,
  output row_t   data
);

  function automatic row_t patt_row(icode_t a);
    row_t r;
    for (int c = 0; c < int'(NMAX); c++)
      r[c] = (c > int'(a));
    return r;
  endfunction

  row_t rom [NMAX];

  always_comb begin
    for (int a = 0; a < int'(NMAX); a++)
      rom[a] = patt_row(icode_t'(a));
  end

  assign data = rom[addr];

endmodule
