// dfbc_wedgelet_store: compressed DMM-1 wedgelet store.
//
// The coded WMem holds every wedgelet of every block size in D-FB&C+ form
// (top-left bit, first-column change, one change position per row, ending
// uniform rows removed).  The D-FB&C+ decoder reads it byte by byte and
// rebuilds one pattern at a time into a 16 x 16 output matrix; the row port
// reads the pattern back a row at a time, doubling a 16 x 16 pattern into
// 32 x 32 when a 32 x 32 block is asked for.
//
// Interface:
//  * load_en/load_addr/load_data fill the coded WMem once, before use.
//  * start with blk and start_bit decodes the wedgelet whose code begins at
//    that bit address; start with cont set decodes the wedgelet stored right
//    after the previous one (a DMM-1 encoder walks the list this way).
//  * done pulses when the pattern is complete; mat holds it in parallel and
//    rd_row/rd_data read one row (combinational).  next_bit is where the next
//    wedgelet's code begins; rows_stored is how many rows the code held.
// Timing: one byte read per cycle at most; one stored row decoded per cycle.
module dfbc_wedgelet_store
  import dfbc_pkg::*;
#(
  parameter int unsigned DEPTH = WMEM_BYTES,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // coded WMem loading
  input  logic              load_en,
  input  logic [AW-1:0]     load_addr,
  input  logic [7:0]        load_data,
  // wedgelet request
  input  logic              start,
  input  logic              cont,
  input  blk_size_e         blk,
  input  logic [AW+2:0]     start_bit,
  output logic              busy,
  output logic              done,
  output logic [4:0]        rows_stored,
  output logic [AW+2:0]     next_bit,
  // decoded pattern
  output row_t              mat [NMAX],
  input  logic [4:0]        rd_row,
  output logic [2*NMAX-1:0] rd_data
);

  logic          mem_rd_en;
  logic [AW-1:0] mem_addr;
  logic [7:0]    mem_rd_data;
  blk_size_e     blk_cur;

  wmem_coded #(.DEPTH(DEPTH), .AW(AW)) u_wmem (
    .clk,
    .wr_en(load_en), .wr_addr(load_addr), .wr_data(load_data),
    .rd_en(mem_rd_en), .rd_addr(mem_addr), .rd_data(mem_rd_data)
  );

  dfbc_decoder #(.AW(AW)) u_decoder (
    .clk, .rst_n, .start, .cont, .blk, .start_bit, .busy, .done,
    .rows_stored, .next_bit, .blk_out(blk_cur),
    .mem_rd_en, .mem_addr, .mem_rd_data, .mat
  );

  wedge_upscale u_upscale (.mat, .blk(blk_cur), .rd_row, .rd_data);

endmodule
