// symbol_encoder: replaces each character of a message by its code word.
//
// Shared by both code generators. It holds no table of its own: the code
// generator presents the distinct symbols (tab_sym), their code words
// (tab_code, first bit sent = bit tab_len-1) and lengths. For every incoming
// character the table is searched in parallel; the matching code word is
// emitted on out_valid/out_code/out_len one cycle later and appended to the
// compressed-data register comp_bits. comp_bits is a shift register: the
// compressed message occupies its comp_len least significant bits, first
// bit at position comp_len-1. `done` rises after the character flagged
// in_last. `clr` empties the register for a new message.
//
// From the document: replacing each unique word by its code word and storing
// the compressed data. The shift-register storage is this design's choice.
module symbol_encoder
  import src_enc_pkg::*;
#(
  parameter int unsigned N     = MAX_LEN,
  parameter int unsigned DW    = SYM_W,
  parameter int unsigned CDW   = N - 1,
  parameter int unsigned CLW   = $clog2(CDW + 1),
  parameter int unsigned BUF_W = N * CDW,
  parameter int unsigned BLW   = $clog2(BUF_W + 1)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   clr,
  input  logic [DW-1:0]          tab_sym  [N],
  input  logic [CDW-1:0]         tab_code [N],
  input  logic [CLW-1:0]         tab_len  [N],
  input  logic [$clog2(N+1)-1:0] tab_n,
  input  logic                   in_valid,
  input  logic [DW-1:0]          in_data,
  input  logic                   in_last,
  output logic                   out_valid,
  output logic [CDW-1:0]         out_code,
  output logic [CLW-1:0]         out_len,
  output logic [BUF_W-1:0]       comp_bits,
  output logic [BLW-1:0]         comp_len,
  output logic                   done
);
  logic [CDW-1:0] m_code;
  logic [CLW-1:0] m_len;
  logic           m_hit;

  always_comb begin
    m_code = '0;
    m_len  = '0;
    m_hit  = 1'b0;
    for (int i = 0; i < int'(N); i++) begin
      if (i < int'(tab_n) && tab_sym[i] == in_data) begin
        m_code = tab_code[i];
        m_len  = tab_len[i];
        m_hit  = 1'b1;
      end
    end
  end

  // Every character of the message must have an entry in the code table.
  a_in_table: assert property (@(posedge clk) disable iff (rst || clr)
                               in_valid && !done |-> m_hit)
    else $error("symbol_encoder: character %h has no code word", in_data);

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      out_valid <= 1'b0;
      out_code  <= '0;
      out_len   <= '0;
      comp_bits <= '0;
      comp_len  <= '0;
      done      <= 1'b0;
    end else begin
      out_valid <= in_valid && !done;
      if (in_valid && !done) begin
        out_code  <= m_code;
        out_len   <= m_len;
        comp_bits <= (comp_bits << m_len) | BUF_W'(m_code);
        comp_len  <= comp_len + BLW'(m_len);
        if (in_last) done <= 1'b1;
      end
    end
  end

endmodule
