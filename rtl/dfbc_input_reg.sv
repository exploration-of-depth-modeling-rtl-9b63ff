// dfbc_input_reg: the input register (InputReg) of the D-FB&C+ decoder.
//
// The coded wedgelets form one bitstream in the byte-wide coded WMem.  An
// ICode (2 to 4 bits) may straddle two bytes, so the register keeps the bits
// left over from the previous byte and appends the next byte behind them, as
// the decoder needs.  Here the register is BUF_W bits wide (default 16: one
// byte plus leftovers plus the byte in flight), kept MSB-aligned: bits[BUF_W-1]
// is the next unread bit and avail says how many bits are valid.
//
// Interface and timing:
//  * init (one cycle) points the register at bit address init_bit; what it
//    holds is discarded.  The bits before init_bit in the first byte are
//    dropped when that byte arrives.
//  * While fetch_en is high it issues byte reads (mem_rd_en/mem_addr) as long
//    as the register cannot overflow; the memory answers one cycle later on
//    mem_rd_data, and the byte is appended at the end of that cycle.
//  * take (0..5) is how many bits the control unit consumes this cycle; it
//    must not exceed avail.  bit_pos is the bit address of the next unread
//    bit, so a caller can resume decoding there later.
// The byte width and the bit order (first bit = bit 7) follow the eight-bit
// input register of the decoder; the buffer depth is this design's choice.
module dfbc_input_reg
  import dfbc_pkg::*;
#(
  parameter int unsigned BUF_W = 16,
  parameter int unsigned AW    = BYTE_AW
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  logic [AW+2:0]     init_bit,
  input  logic              fetch_en,
  output logic              mem_rd_en,
  output logic [AW-1:0]     mem_addr,
  input  logic [7:0]        mem_rd_data,
  output logic [BUF_W-1:0]  bits,
  output logic [4:0]        avail,
  input  logic [2:0]        take,
  output logic [AW+2:0]     bit_pos
);

  logic [BUF_W-1:0] buf_q;
  logic [4:0]       cnt_q;
  logic [AW-1:0]    addr_q;
  logic             pend_q;     // a byte read last cycle is on mem_rd_data
  logic [2:0]       skip_q;     // leading bits to drop from the next byte
  logic [AW+2:0]    pos_q;

  logic [BUF_W-1:0] buf_d;
  logic [4:0]       cnt_d;
  logic [BUF_W-1:0] incoming;
  int               rest;

  assign bits    = buf_q;
  assign avail   = cnt_q;
  assign bit_pos = pos_q;
  assign mem_addr = addr_q;

  always_comb begin
    rest = int'(cnt_q) - int'(take);
    // issue a read only if the byte fits even when nothing more is consumed
    mem_rd_en = fetch_en && !init &&
                (rest + (pend_q ? 8 : 0) + 8 <= int'(BUF_W));
    buf_d = buf_q << take;
    cnt_d = 5'(rest);
    incoming = {mem_rd_data, {(BUF_W-8){1'b0}}} << skip_q;
    if (pend_q) begin
      buf_d = buf_d | (incoming >> rest);
      cnt_d = 5'(rest + 8 - int'(skip_q));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q  <= '0;
      cnt_q  <= '0;
      addr_q <= '0;
      pend_q <= 1'b0;
      skip_q <= '0;
      pos_q  <= '0;
    end else if (init) begin
      buf_q  <= '0;
      cnt_q  <= '0;
      addr_q <= init_bit[AW+2:3];
      pend_q <= 1'b0;
      skip_q <= init_bit[2:0];
      pos_q  <= init_bit;
    end else begin
      buf_q  <= buf_d;
      cnt_q  <= cnt_d;
      pend_q <= mem_rd_en;
      if (mem_rd_en) addr_q <= addr_q + 1'b1;
      if (pend_q)    skip_q <= '0;
      pos_q  <= pos_q + (AW+3)'(take);
    end
  end

  // The control unit never consumes bits that are not there.
  a_take_le_avail: assert property (@(posedge clk) disable iff (!rst_n)
                                    !init |-> (5'(take) <= cnt_q));

endmodule
