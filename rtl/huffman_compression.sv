// huffman_compression: builds the Huffman tree of one message window.
//
// A pulse on `start` hands the frequency table to the frequency sorter
// (descending counts). The tree is then built with the two-queue method:
// the leaves, already sorted, form one queue whose smallest entry is the
// last leaf still unused; the internal nodes form a second queue, created in
// non-decreasing weight order. Each cycle the two lightest heads of the two
// queues are taken, the adder sums their weights, and a new internal node
// with that weight becomes their parent. n distinct symbols take n-1 merges.
// On equal weights a leaf is taken before an internal node.
//
// Node numbering: leaves 0..N-1 in sorted order (0 = most frequent),
// internal nodes N..2N-2 in creation order. For every node the module keeps
// its parent and the bit on the edge to that parent: the lighter child of a
// merge gets 0, the heavier gets 1 (heavier on the side labelled 1, as in
// the document's tree figure). `root` names the root; with a single symbol
// the root is leaf 0 itself.
//
// Timing: done rises N+1 cycles after start for the sort and one cycle per
// merge after that, then holds until the next start.
//
// From the document: sorter then adder then tree, the pairing of the two
// least frequent nodes. The two-queue scheme, the tie rule and the edge
// labelling are this design's choices.
module huffman_compression
  import src_enc_pkg::*;
#(
  parameter int unsigned N  = MAX_LEN,
  parameter int unsigned DW = SYM_W,
  parameter int unsigned CW = $clog2(N + 1),
  parameter int unsigned NW = $clog2(2 * N - 1)
) (
  input  logic                   clk,
  input  logic                   rst,          // active high
  input  logic                   start,
  input  logic [DW-1:0]          sym_in [N],
  input  logic [CW-1:0]          cnt_in [N],
  input  logic [$clog2(N+1)-1:0] n_in,
  output logic [DW-1:0]          sym_s [N],    // symbols, sorted
  output logic [CW-1:0]          cnt_s [N],    // counts, sorted
  output logic [$clog2(N+1)-1:0] n_unique,
  output logic [NW-1:0]          parent [2*N-1],
  output logic                   edge_bit [2*N-1],
  output logic [NW-1:0]          root,
  output logic                   done
);
  localparam int unsigned NN = 2 * N - 1;
  localparam int unsigned LW = $clog2(N + 1);

  typedef enum logic [1:0] {S_IDLE, S_SORT, S_MERGE, S_DONE} state_e;
  state_e state;

  logic          sort_en, sort_done;
  logic [CW-1:0] wi [N];                 // weights of internal nodes
  logic [LW-1:0] l_rem;                  // leaves not yet merged
  logic [LW-1:0] h2, t2;                 // internal-node queue head and tail

  frequency_sorter #(.N(N), .DW(DW), .CW(CW)) u_sorter (
    .clk, .rst_n(!rst), .en(sort_en),
    .sym_in, .cnt_in, .sym_out(sym_s), .cnt_out(cnt_s), .done(sort_done)
  );

  assign sort_en = (state == S_IDLE || state == S_DONE) && start;

  // Choose the two lightest queue heads.
  logic          a_leaf, b_leaf;
  logic [CW-1:0] wa, wb, wsum;
  logic [NW-1:0] na, nb;
  logic [LW-1:0] l_rem_a, h2_a;

  function automatic logic [CW-1:0] leaf_w(input logic [LW-1:0] rem);
    return (rem == '0) ? '0 : cnt_s[rem - 1'b1];
  endfunction

  always_comb begin
    a_leaf  = (l_rem != '0) && ((t2 == h2) || (leaf_w(l_rem) <= wi[h2[$clog2(N)-1:0]]));
    wa      = a_leaf ? leaf_w(l_rem) : wi[h2[$clog2(N)-1:0]];
    na      = a_leaf ? NW'(l_rem - 1'b1) : NW'(N + h2);
    l_rem_a = a_leaf ? l_rem - 1'b1 : l_rem;
    h2_a    = a_leaf ? h2 : h2 + 1'b1;
    b_leaf  = (l_rem_a != '0) && ((t2 == h2_a) || (leaf_w(l_rem_a) <= wi[h2_a[$clog2(N)-1:0]]));
    wb      = b_leaf ? leaf_w(l_rem_a) : wi[h2_a[$clog2(N)-1:0]];
    nb      = b_leaf ? NW'(l_rem_a - 1'b1) : NW'(N + h2_a);
  end

  freq_adder #(.W(CW)) u_adder (.NUM_1(wa), .NUM_2(wb), .SUM(wsum));

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      l_rem    <= '0;
      h2       <= '0;
      t2       <= '0;
      n_unique <= '0;
      root     <= '0;
      done     <= 1'b0;
      for (int i = 0; i < int'(N); i++) wi[i] <= '0;
      for (int i = 0; i < int'(NN); i++) begin
        parent[i]   <= '0;
        edge_bit[i] <= 1'b0;
      end
    end else begin
      unique case (state)
        S_IDLE, S_DONE: if (start) begin
          state    <= S_SORT;
          done     <= 1'b0;
          n_unique <= n_in;
          h2       <= '0;
          t2       <= '0;
          root     <= '0;
          for (int i = 0; i < int'(NN); i++) begin
            parent[i]   <= '0;
            edge_bit[i] <= 1'b0;
          end
        end
        S_SORT: if (sort_done) begin
          l_rem <= n_unique;
          state <= (n_unique > 1) ? S_MERGE : S_DONE;
          done  <= (n_unique <= 1);
        end
        S_MERGE: begin
          parent[na]              <= NW'(N + t2);
          parent[nb]              <= NW'(N + t2);
          edge_bit[na]            <= 1'b0;
          edge_bit[nb]            <= 1'b1;
          wi[t2[$clog2(N)-1:0]]   <= wsum;
          t2                      <= t2 + 1'b1;
          l_rem                   <= b_leaf ? l_rem_a - 1'b1 : l_rem_a;
          h2                      <= b_leaf ? h2_a : h2_a + 1'b1;
          // Last merge: no leaves left and the new node is the only one queued.
          if ((b_leaf ? l_rem_a - 1'b1 : l_rem_a) == '0 &&
              (b_leaf ? h2_a : h2_a + 1'b1) == t2) begin
            root  <= NW'(N + t2);
            state <= S_DONE;
            done  <= 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

endmodule
