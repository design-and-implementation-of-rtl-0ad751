// huffman_code_generator: turns the Huffman tree into code words and
// encodes the message with them.
//
// After `start` it walks from every leaf up to the root, one edge per cycle,
// collecting the edge bits; the bit nearest the root is the first bit of the
// code word. A lone symbol (the root is a leaf) gets the one-bit code 0.
// With all code words known it pulses msg_req, which asks the lane's memory
// element to replay the message, and the symbol_encoder replaces each
// character by its code word. `done` rises when the last character has been
// encoded and holds until the next start.
//
// Outputs: the code table (code[i], len[i] for sorted symbol i), the
// per-character code stream and the stored compressed data.
// Timing: sum of the code lengths cycles for the walk (one extra per leaf),
// then the message length plus a few cycles for the encoding.
//
// From the document: code generation from the tree and replacement of each
// unique word by its code. The leaf-to-root walk is this design's choice.
module huffman_code_generator
  import src_enc_pkg::*;
#(
  parameter int unsigned N     = MAX_LEN,
  parameter int unsigned DW    = SYM_W,
  parameter int unsigned NW    = $clog2(2 * N - 1),
  parameter int unsigned CDW   = N - 1,
  parameter int unsigned CLW   = $clog2(CDW + 1),
  parameter int unsigned BUF_W = N * CDW,
  parameter int unsigned BLW   = $clog2(BUF_W + 1)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   start,
  input  logic [DW-1:0]          sym_s [N],
  input  logic [$clog2(N+1)-1:0] n_unique,
  input  logic [NW-1:0]          parent [2*N-1],
  input  logic                   edge_bit [2*N-1],
  input  logic [NW-1:0]          root,
  // message replay from the memory element
  output logic                   msg_req,
  input  logic                   in_valid,
  input  logic [DW-1:0]          in_data,
  input  logic                   in_last,
  // results
  output logic [CDW-1:0]         code [N],
  output logic [CLW-1:0]         len  [N],
  output logic                   out_valid,
  output logic [CDW-1:0]         out_code,
  output logic [CLW-1:0]         out_len,
  output logic [BUF_W-1:0]       comp_bits,
  output logic [BLW-1:0]         comp_len,
  output logic                   done
);
  localparam int unsigned IW = $clog2(N + 1);

  typedef enum logic [2:0] {G_IDLE, G_WALK, G_REQ, G_ENC, G_DONE} state_e;
  state_e state;

  logic [IW-1:0]  leaf;
  logic [NW-1:0]  cur;
  logic [CLW-1:0] depth;
  logic [CDW-1:0] acc;
  logic           enc_done;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= G_IDLE;
      leaf  <= '0;
      cur   <= '0;
      depth <= '0;
      acc   <= '0;
      done  <= 1'b0;
      for (int i = 0; i < int'(N); i++) begin
        code[i] <= '0;
        len[i]  <= '0;
      end
    end else begin
      unique case (state)
        G_IDLE, G_DONE: if (start) begin
          done  <= 1'b0;
          leaf  <= '0;
          cur   <= '0;
          depth <= '0;
          acc   <= '0;
          for (int i = 0; i < int'(N); i++) begin
            code[i] <= '0;
            len[i]  <= '0;
          end
          if (n_unique == '0) begin
            state <= G_DONE;
            done  <= 1'b1;
          end else begin
            state <= G_WALK;
          end
        end
        G_WALK: begin
          if (cur == root) begin
            code[leaf[$clog2(N)-1:0]] <= acc;
            len[leaf[$clog2(N)-1:0]]  <= (depth == '0) ? CLW'(1) : depth;
            acc   <= '0;
            depth <= '0;
            cur   <= NW'(leaf + 1'b1);
            leaf  <= leaf + 1'b1;
            if (leaf + 1'b1 == n_unique) state <= G_REQ;
          end else begin
            acc[depth[$clog2(CDW)-1:0]] <= edge_bit[cur];
            cur   <= parent[cur];
            depth <= depth + 1'b1;
          end
        end
        G_REQ: state <= G_ENC;
        G_ENC: if (enc_done) begin
          state <= G_DONE;
          done  <= 1'b1;
        end
        default: ;
      endcase
    end
  end

  assign msg_req = (state == G_REQ);

  symbol_encoder #(.N(N), .DW(DW), .CDW(CDW), .CLW(CLW), .BUF_W(BUF_W), .BLW(BLW)) u_enc (
    .clk, .rst, .clr((state == G_IDLE || state == G_DONE) && start),
    .tab_sym(sym_s), .tab_code(code), .tab_len(len), .tab_n(n_unique),
    .in_valid(in_valid && state == G_ENC), .in_data, .in_last,
    .out_valid, .out_code, .out_len, .comp_bits, .comp_len, .done(enc_done)
  );

endmodule
