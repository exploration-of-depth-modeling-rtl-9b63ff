// dfbc_decoder: the D-FB&C+ wedgelet decoder that sits between the coded
// WMem and a DMM-1 encoder or decoder.
//
// Structure (as in the decoder's block diagram): the input register takes
// bytes from the coded WMem; the control unit splits them into the first bit
// (AuxB), the first-column ICode (AuxCol) and one row ICode per row, which it
// loads into AddressReg; AddressReg selects a PattMem row; cci and the ci
// inverters turn it into the real row; the row is written into OutMatrix.
//
// Interface: start (with blk and either start_bit or cont) begins one
// wedgelet; done pulses when mat holds the whole pattern, which stays there
// until the next start.  next_bit is the bit address just after the consumed
// bits (valid with done).  The memory port expects a synchronous, one-cycle
// read.  Timing: after the first byte arrives, the header takes one cycle and
// each stored row one cycle, plus one cycle to write the last row; removed
// ending rows cost nothing.  A 16 x 16 wedgelet with all rows stored takes
// about 20 cycles from start to done.
module dfbc_decoder
  import dfbc_pkg::*;
#(
  parameter int unsigned AW = BYTE_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          cont,
  input  blk_size_e     blk,
  input  logic [AW+2:0] start_bit,
  output logic          busy,
  output logic          done,
  output logic [4:0]    rows_stored,
  output logic [AW+2:0] next_bit,
  output blk_size_e     blk_out,
  // coded WMem read port
  output logic          mem_rd_en,
  output logic [AW-1:0] mem_addr,
  input  logic [7:0]    mem_rd_data,
  // decoded pattern
  output row_t          mat [NMAX]
);

  localparam int unsigned BUF_W = 16;

  logic             rd_init, rd_fetch_en;
  logic [BUF_W-1:0] rd_bits;
  logic [4:0]       rd_avail;
  logic [2:0]       rd_take;
  logic             aux_b, wr_en, wr_fill, mat_clr;
  icode_t           aux_col, addr_reg, wr_row;
  row_t             patt, row;

  dfbc_input_reg #(.BUF_W(BUF_W), .AW(AW)) u_input_reg (
    .clk, .rst_n,
    .init(rd_init), .init_bit(start_bit), .fetch_en(rd_fetch_en),
    .mem_rd_en, .mem_addr, .mem_rd_data,
    .bits(rd_bits), .avail(rd_avail), .take(rd_take), .bit_pos(next_bit)
  );

  dfbc_control #(.BUF_W(BUF_W)) u_control (
    .clk, .rst_n,
    .start, .cont, .blk, .busy, .done, .rows_stored,
    .rd_init, .rd_fetch_en, .rd_bits, .rd_avail, .rd_take,
    .blk_q(blk_out), .aux_b, .aux_col, .addr_reg, .wr_row, .wr_en, .wr_fill,
    .mat_clr
  );

  patt_mem u_patt_mem (.addr(addr_reg), .data(patt));

  ci_row_inverter u_ci (
    .patt, .aux_b, .aux_col, .row_blk(wr_row), .blk(blk_out), .row_out(row)
  );

  out_matrix u_out_matrix (
    .clk, .rst_n, .clr(mat_clr), .wr_en, .wr_fill, .wr_row, .blk(blk_out),
    .wr_data(row), .mat
  );

endmodule
