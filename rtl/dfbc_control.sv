// dfbc_control: the control unit (ControlUnit) of the D-FB&C+ decoder, with
// its registers AuxB, AuxCol and AddressReg.
//
// Per wedgelet it walks through three states:
//  IDLE  waits for start.  A start clears the output matrix and, unless cont
//        is set, restarts the input register (at the requested bit address,
//        which goes to it directly); with cont the
//        decoder goes on with the bits that follow the previous wedgelet.
//  HEAD  takes the first coded bit into AuxB and the next ICode (first-column
//        change) into AuxCol, once 1 + L bits are available (L = log2 N).
//  ROWS  takes one ICode per cycle into AddressReg, with the row number.  In
//        the next cycle the PattMem row it selects passes the inverters and is
//        written into that row of the output matrix.
// Ending rows removal: a row whose ICode is N-1 has all bits equal.  If such
// a row lies below the first-column change (row > AuxCol) or comes after a row
// that had a change, every remaining row is a copy of it, so nothing more was
// stored: the row is written with wr_fill set, which copies it down to the
// last row, and the wedgelet ends.  Otherwise the wedgelet ends after row N-1.
// This stop rule is this design's reading of the ending-rows condition; the
// state machine and its handshake are this design's own.
//
// Timing: done is a one-cycle pulse in the first cycle the complete pattern is
// in the output matrix; busy is high from the cycle after start until the last
// row is written.  A start while busy is ignored.  rows_stored gives how many
// rows the wedgelet had in the coded WMem.
module dfbc_control
  import dfbc_pkg::*;
#(
  parameter int unsigned BUF_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // request
  input  logic             start,
  input  logic             cont,
  input  blk_size_e        blk,
  output logic             busy,
  output logic             done,
  output logic [4:0]       rows_stored,
  // input register
  output logic             rd_init,
  output logic             rd_fetch_en,
  input  logic [BUF_W-1:0] rd_bits,
  input  logic [4:0]       rd_avail,
  output logic [2:0]       rd_take,
  // row datapath
  output blk_size_e        blk_q,
  output logic             aux_b,
  output icode_t           aux_col,
  output icode_t           addr_reg,
  output icode_t           wr_row,
  output logic             wr_en,
  output logic             wr_fill,
  output logic             mat_clr
);

  typedef enum logic [1:0] {S_IDLE, S_HEAD, S_ROWS} state_e;

  state_e     state_q;
  logic [2:0] len;          // ICode length L
  icode_t     last_code;    // N-1: "no change" ICode
  logic [4:0] row_q;        // next row to decode
  logic       seen_chg_q;   // a stored row had a change
  logic       fin_q;        // the last row is being written this cycle
  icode_t     code;         // ICode at the head of the input register
  icode_t     col_code;     // ICode after the first bit
  logic       accept;
  logic       uniform, last_row, err_stop;

  always_comb begin
    len       = icode_len(blk_q);
    last_code = icode_t'((1 << len) - 1);
    code      = icode_t'(rd_bits[BUF_W-1 -: LMAX] >> (LMAX - 32'(len)));
    col_code  = icode_t'(rd_bits[BUF_W-2 -: LMAX] >> (LMAX - 32'(len)));
    accept    = start && !busy;

    uniform   = (code == last_code);
    last_row  = (row_q == 5'(last_code));
    err_stop  = uniform && !last_row &&
                ((row_q > 5'(aux_col)) || seen_chg_q);

    rd_take = '0;
    unique case (state_q)
      S_HEAD: if (rd_avail >= 5'(len) + 5'd1) rd_take = len + 3'd1;
      S_ROWS: if (rd_avail >= 5'(len))        rd_take = len;
      default: ;
    endcase
  end

  assign busy        = (state_q != S_IDLE) || fin_q;
  assign rd_init     = accept && !cont;
  assign rd_fetch_en = (state_q != S_IDLE);
  assign mat_clr     = accept;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      blk_q       <= BLK_4X4;
      aux_b       <= 1'b0;
      aux_col     <= '0;
      addr_reg    <= '0;
      wr_row      <= '0;
      wr_en       <= 1'b0;
      wr_fill     <= 1'b0;
      row_q       <= '0;
      seen_chg_q  <= 1'b0;
      fin_q       <= 1'b0;
      done        <= 1'b0;
      rows_stored <= '0;
    end else begin
      wr_en   <= 1'b0;
      wr_fill <= 1'b0;
      fin_q   <= 1'b0;
      done    <= fin_q;
      unique case (state_q)
        S_IDLE: if (accept) begin
          blk_q      <= blk;
          row_q      <= '0;
          seen_chg_q <= 1'b0;
          state_q    <= S_HEAD;
        end
        S_HEAD: if (rd_take != 0) begin
          aux_b   <= rd_bits[BUF_W-1];
          aux_col <= col_code;
          state_q <= S_ROWS;
        end
        S_ROWS: if (rd_take != 0) begin
          addr_reg   <= code;
          wr_row     <= icode_t'(row_q);
          wr_en      <= 1'b1;
          wr_fill    <= err_stop;
          row_q      <= row_q + 5'd1;
          seen_chg_q <= seen_chg_q || !uniform;
          if (err_stop || last_row) begin
            fin_q       <= 1'b1;
            rows_stored <= row_q + 5'd1;
            state_q     <= S_IDLE;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  a_take_bounded: assert property (@(posedge clk) disable iff (!rst_n)
                                   5'(rd_take) <= rd_avail);

endmodule
