// wmem_coded: the coded wedgelet memory (WMem) holding the D-FB&C+ bitstreams
// of every wedgelet of every block size, packed back to back, first coded
// bit in bit 7 of a byte.
//
// It is read one byte per access, as the decoder's input register takes
// eight bits per read.  The read is synchronous: rd_data is valid in the
// cycle after rd_en.  The contents are fixed at design time; this model gives
// them a write port (wr_en/wr_addr/wr_data) so that a system can load them once
// after power-up, which is this design's choice.  The default depth,
// WMEM_BYTES = 4872, holds the D-FB&C+ codes of the 4x4, 8x8 and 16x16
// wedgelet sets (888, 16,150 and 21,930 bits), each region starting on a byte
// boundary.
module wmem_coded
  import dfbc_pkg::*;
#(
  parameter int unsigned DEPTH = WMEM_BYTES,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  // load port
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [7:0]    wr_data,
  // read port
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [7:0]    rd_data
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en && (32'(wr_addr) < DEPTH))
      mem[wr_addr] <= wr_data;
    if (rd_en)
      rd_data <= (32'(rd_addr) < DEPTH) ? mem[rd_addr] : 8'h00;
  end

endmodule
