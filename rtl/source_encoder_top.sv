// source_encoder_top: reconfigurable Huffman / Shannon source encoder.
//
// Two encoding lanes stand side by side and share one character input:
//   Huffman lane: memory_element -> frequency_calculator ->
//                 huffman_compression (sorter, adder, tree) ->
//                 huffman_code_generator (code words, encoder) -> huf_*
//   Shannon lane: memory_element -> frequency_calculator ->
//                 shannon_compression (sorter, adder, cumulative counts,
//                 code lengths or Shannon-Fano splitting) ->
//                 shannon_code_generator -> sha_*
// The connection_controller in the middle latches `mode` at `start`, enables
// one lane or both, and steps them through load, count, build and code. The
// memory element of a lane is replayed twice: once into the frequency
// calculator, once into the encoder; the controller's route_enc selects
// which of them listens.
//
// Use: pulse start with mode (1 Huffman, 2 Shannon, 3 both) and sf_mode
// (Shannon lane algorithm: 0 Shannon, 1 Shannon-Fano); while in_ready
// is high, present one character per cycle on in_valid/in_data and mark the
// final one with in_last (at most MAX_LEN characters are kept; more set
// overflow). `done` pulses when every enabled lane has finished. Then the
// code tables (sorted symbols, code words, lengths), the compressed data
// (the low *_nbits bits of *_bits, first bit highest) are valid, and the code
// word of each character has been streamed on *_out_valid/_code/_len.
//
// The lane structure and the central controller follow the document's block
// diagram; widths, handshakes and encodings are this design's choices.
module source_encoder_top
  import src_enc_pkg::*;
#(
  parameter int unsigned N     = MAX_LEN,
  parameter int unsigned DW    = SYM_W,
  parameter int unsigned CW    = $clog2(N + 1),
  parameter int unsigned CDW   = N - 1,
  parameter int unsigned CLW   = $clog2(CDW + 1),
  parameter int unsigned BUF_W = N * CDW,
  parameter int unsigned BLW   = $clog2(BUF_W + 1)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   start,
  input  enc_mode_e              mode,
  input  logic                   sf_mode,
  input  logic                   in_valid,
  input  logic [DW-1:0]          in_data,
  input  logic                   in_last,
  output logic                   in_ready,
  output logic                   busy,
  output logic                   done,
  output logic [1:0]             overflow,
  // Huffman lane
  output logic [DW-1:0]          huf_sym  [N],
  output logic [CDW-1:0]         huf_code [N],
  output logic [CLW-1:0]         huf_len  [N],
  output logic [$clog2(N+1)-1:0] huf_n,
  output logic                   huf_out_valid,
  output logic [CDW-1:0]         huf_out_code,
  output logic [CLW-1:0]         huf_out_len,
  output logic [BUF_W-1:0]       huf_bits,
  output logic [BLW-1:0]         huf_nbits,
  // Shannon lane
  output logic [DW-1:0]          sha_sym  [N],
  output logic [CDW-1:0]         sha_code [N],
  output logic [CLW-1:0]         sha_len  [N],
  output logic [$clog2(N+1)-1:0] sha_n,
  output logic                   sha_out_valid,
  output logic [CDW-1:0]         sha_out_code,
  output logic [CLW-1:0]         sha_out_len,
  output logic [BUF_W-1:0]       sha_bits,
  output logic [BLW-1:0]         sha_nbits
);
  localparam int unsigned NW = $clog2(2 * N - 1);
  localparam int unsigned IW = $clog2(N + 1);

  // Controller
  logic [1:0]  lane_en, mem_clr, mem_wr, mem_rd_start, freq_clr, freq_s;
  logic [1:0]  comp_start, comp_done, cg_start, cg_msg_req, cg_done;
  logic        route_enc, sf_sel;
  ctrl_phase_e phase;

  connection_controller u_ctrl (
    .clk, .rst, .start, .mode, .sf_mode, .in_valid, .in_last, .in_ready,
    .lane_en, .sf_sel, .mem_clr, .mem_wr, .mem_rd_start, .route_enc,
    .freq_clr, .freq_s, .comp_start, .comp_done,
    .cg_start, .cg_msg_req, .cg_done, .phase, .busy, .done
  );

  // Memory elements and frequency calculators, one pair per lane.
  logic          m_valid [2];
  logic [DW-1:0] m_data  [2];
  logic          m_last  [2];
  logic          m_status[2];
  logic [IW-1:0] m_len   [2];
  logic [DW-1:0] f_sym   [2][N];
  logic [CW-1:0] f_cnt   [2][N];
  logic [IW-1:0] f_n     [2];

  for (genvar l = 0; l < 2; l++) begin : g_lane
    memory_element #(.DEPTH(N), .DW(DW)) u_mem (
      .clk, .rst, .clr(mem_clr[l]), .wr_en(mem_wr[l]), .wr_data(in_data),
      .rd_start(mem_rd_start[l]),
      .out_valid(m_valid[l]), .out_data(m_data[l]), .out_last(m_last[l]),
      .status(m_status[l]), .len(m_len[l]), .overflow(overflow[l])
    );

    frequency_calculator #(.N(N), .DW(DW), .CW(CW)) u_freq (
      .clk, .rst, .clr(freq_clr[l]),
      .in_valid(m_valid[l] && !route_enc), .in_data(m_data[l]), .in_last(m_last[l]),
      .sym(f_sym[l]), .cnt(f_cnt[l]), .n_unique(f_n[l]), .s(freq_s[l])
    );
  end

  // Huffman lane
  logic [DW-1:0] h_sym_s [N];
  logic [CW-1:0] h_cnt_s [N];
  logic [NW-1:0] h_parent [2*N-1];
  logic          h_edge [2*N-1];
  logic [NW-1:0] h_root;

  huffman_compression #(.N(N), .DW(DW), .CW(CW), .NW(NW)) u_huf_comp (
    .clk, .rst, .start(comp_start[0]),
    .sym_in(f_sym[0]), .cnt_in(f_cnt[0]), .n_in(f_n[0]),
    .sym_s(h_sym_s), .cnt_s(h_cnt_s), .n_unique(huf_n),
    .parent(h_parent), .edge_bit(h_edge), .root(h_root), .done(comp_done[0])
  );

  huffman_code_generator #(.N(N), .DW(DW), .NW(NW), .CDW(CDW), .CLW(CLW),
                           .BUF_W(BUF_W), .BLW(BLW)) u_huf_cg (
    .clk, .rst, .start(cg_start[0]),
    .sym_s(h_sym_s), .n_unique(huf_n), .parent(h_parent), .edge_bit(h_edge), .root(h_root),
    .msg_req(cg_msg_req[0]),
    .in_valid(m_valid[0] && route_enc), .in_data(m_data[0]), .in_last(m_last[0]),
    .code(huf_code), .len(huf_len),
    .out_valid(huf_out_valid), .out_code(huf_out_code), .out_len(huf_out_len),
    .comp_bits(huf_bits), .comp_len(huf_nbits), .done(cg_done[0])
  );

  assign huf_sym = h_sym_s;

  // Shannon lane
  logic [DW-1:0]  s_sym_s [N];
  logic [CW-1:0]  s_cnt_s [N];
  logic [CW-1:0]  s_cum   [N];
  logic [CLW-1:0] s_len   [N];
  logic [CDW-1:0] s_sf    [N];
  logic [CW-1:0]  s_total;

  shannon_compression #(.N(N), .DW(DW), .CW(CW), .CDW(CDW), .CLW(CLW)) u_sha_comp (
    .clk, .rst, .start(comp_start[1]), .sf_mode(sf_sel),
    .sym_in(f_sym[1]), .cnt_in(f_cnt[1]), .n_in(f_n[1]),
    .sym_s(s_sym_s), .cnt_s(s_cnt_s), .n_unique(sha_n),
    .cum(s_cum), .len(s_len), .sf_code(s_sf), .total(s_total), .done(comp_done[1])
  );

  shannon_code_generator #(.N(N), .DW(DW), .CW(CW), .CDW(CDW), .CLW(CLW),
                           .BUF_W(BUF_W), .BLW(BLW)) u_sha_cg (
    .clk, .rst, .start(cg_start[1]), .sf_mode(sf_sel),
    .sym_s(s_sym_s), .n_unique(sha_n), .cum(s_cum), .len_in(s_len), .sf_code(s_sf), .total(s_total),
    .msg_req(cg_msg_req[1]),
    .in_valid(m_valid[1] && route_enc), .in_data(m_data[1]), .in_last(m_last[1]),
    .code(sha_code), .len(sha_len),
    .out_valid(sha_out_valid), .out_code(sha_out_code), .out_len(sha_out_len),
    .comp_bits(sha_bits), .comp_len(sha_nbits), .done(cg_done[1])
  );

  assign sha_sym = s_sym_s;

endmodule
