// shannon_compression: the Shannon lane's counterpart of the Huffman tree
// builder.
//
// A pulse on `start` hands the frequency table to the frequency sorter
// (descending counts). Then the adder accumulates the sorted counts, one
// symbol per cycle, into cumulative counts: cum[0] = 0, cum[i] = cnt[0] +
// ... + cnt[i-1]. With the message length T = cum[n], symbol i, of
// probability p = cnt[i]/T and cumulative probability F = cum[i]/T, gets the
// code length len[i] = ceil(log2(1/p)), found in one cycle as the smallest
// l >= 1 with cnt[i] * 2^l >= T. (A message of one distinct symbol thus gets
// length 1.) The code word itself, the first len[i] bits of the binary
// expansion of F, is formed by the Shannon code generator.
//
// With sf_mode set at start the lane builds a Shannon-Fano code instead:
// the sorted symbols form one group, and a stack of groups [lo, hi) is
// split one group per cycle at the point k where the counts above and below
// are closest to equal, |C(k)-C(lo) - (C(hi)-C(k))| smallest (first such k),
// with C the cumulative counts. Every symbol of the upper part appends a 0
// to its code word, every symbol of the lower part a 1; parts of two or more
// symbols are pushed back. The finished code words appear on sf_code and
// their lengths on len.
//
// Timing: done rises N+1 cycles after start for the sort, plus one cycle per
// distinct symbol and one for the lengths (Shannon) or one per split,
// n-1 for n symbols (Shannon-Fano); it holds until the next start.
//
// From the document: sorter, adder, the cumulative probabilities and code
// lengths its Shannon example prints, and the recursive division into groups
// of nearly equal probability for Shannon-Fano. Integer counts instead of
// fractions, the split tie rule and the 0/1 labelling are this design's
// choices.
module shannon_compression
  import src_enc_pkg::*;
#(
  parameter int unsigned N   = MAX_LEN,
  parameter int unsigned DW  = SYM_W,
  parameter int unsigned CW  = $clog2(N + 1),
  parameter int unsigned CDW = N - 1,
  parameter int unsigned CLW = $clog2(CDW + 1)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   start,
  input  logic                   sf_mode,      // 0 Shannon, 1 Shannon-Fano
  input  logic [DW-1:0]          sym_in [N],
  input  logic [CW-1:0]          cnt_in [N],
  input  logic [$clog2(N+1)-1:0] n_in,
  output logic [DW-1:0]          sym_s [N],
  output logic [CW-1:0]          cnt_s [N],
  output logic [$clog2(N+1)-1:0] n_unique,
  output logic [CW-1:0]          cum [N],
  output logic [CLW-1:0]         len [N],
  output logic [CDW-1:0]         sf_code [N],  // Shannon-Fano code words
  output logic [CW-1:0]          total,
  output logic                   done
);
  localparam int unsigned IW = $clog2(N + 1);

  typedef enum logic [2:0] {H_IDLE, H_SORT, H_ACC, H_LEN, H_SPLIT, H_DONE} state_e;
  state_e state;
  logic   sf;                        // mode latched at start

  logic          sort_en, sort_done;
  logic [IW-1:0] idx;
  logic [CW-1:0] run, run_next;

  frequency_sorter #(.N(N), .DW(DW), .CW(CW)) u_sorter (
    .clk, .rst_n(!rst), .en(sort_en),
    .sym_in, .cnt_in, .sym_out(sym_s), .cnt_out(cnt_s), .done(sort_done)
  );

  assign sort_en = (state == H_IDLE || state == H_DONE) && start;

  freq_adder #(.W(CW)) u_adder (
    .NUM_1(run), .NUM_2(cnt_s[idx[$clog2(N)-1:0]]), .SUM(run_next)
  );

  // Smallest l >= 1 with c * 2^l >= t.
  function automatic logic [CLW-1:0] code_length(input logic [CW-1:0] c,
                                                 input logic [CW-1:0] t);
    logic [CLW-1:0] l;
    l = CLW'(CDW);
    for (int k = int'(CDW); k >= 1; k--) begin
      if (((CW + CDW)'(c) << k) >= (CW + CDW)'(t)) l = CLW'(k);
    end
    return l;
  endfunction

  // Shannon-Fano splitting. A stack holds the groups [lo, hi) of sorted
  // symbols still to be split; C(i) is the count of symbols before i.
  logic [IW-1:0] stk_lo [N], stk_hi [N];
  logic [IW-1:0] sp, g_lo, g_hi, g_k;
  logic [$clog2(N)-1:0] top, nxt;     // stack slots: top of stack and the one above

  assign top = $clog2(N)'(sp - 1'b1);
  assign nxt = $clog2(N)'(sp);

  function automatic logic [CW-1:0] prefix(input logic [IW-1:0] i);
    return (i >= n_unique) ? run : cum[i[$clog2(N)-1:0]];
  endfunction

  always_comb begin
    logic [CW+1:0] best, d, lhs, rhs;
    g_lo = stk_lo[top];
    g_hi = stk_hi[top];
    g_k  = g_lo + 1'b1;
    best = '1;
    lhs  = '0;
    rhs  = '0;
    d    = '0;
    for (int k = 1; k < int'(N); k++) begin
      if (k > int'(g_lo) && k < int'(g_hi)) begin
        // |2*(C(k)-C(lo)) - (C(hi)-C(lo))| = |(C(k)-C(lo)) - (C(hi)-C(k))|
        lhs = (CW+2)'(prefix(IW'(k)) - prefix(g_lo));
        rhs = (CW+2)'(prefix(g_hi) - prefix(IW'(k)));
        d   = (lhs >= rhs) ? lhs - rhs : rhs - lhs;
        if (d < best) begin
          best = d;
          g_k  = IW'(k);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= H_IDLE;
      idx      <= '0;
      run      <= '0;
      total    <= '0;
      n_unique <= '0;
      done     <= 1'b0;
      sf       <= 1'b0;
      sp       <= '0;
      for (int i = 0; i < int'(N); i++) begin
        cum[i]     <= '0;
        len[i]     <= '0;
        sf_code[i] <= '0;
        stk_lo[i]  <= '0;
        stk_hi[i]  <= '0;
      end
    end else begin
      unique case (state)
        H_IDLE, H_DONE: if (start) begin
          state    <= H_SORT;
          done     <= 1'b0;
          n_unique <= n_in;
          idx      <= '0;
          run      <= '0;
          sf       <= sf_mode;
          for (int i = 0; i < int'(N); i++) begin
            cum[i]     <= '0;
            len[i]     <= '0;
            sf_code[i] <= '0;
          end
        end
        H_SORT: if (sort_done) state <= (n_unique == '0) ? H_LEN : H_ACC;
        H_ACC: begin
          cum[idx[$clog2(N)-1:0]] <= run;
          run <= run_next;
          idx <= idx + 1'b1;
          if (idx + 1'b1 == n_unique) begin
            state     <= (sf && n_unique > 1) ? H_SPLIT : H_LEN;
            sp        <= IW'(1);
            stk_lo[0] <= '0;
            stk_hi[0] <= n_unique;
          end
        end
        H_SPLIT: begin
          // Split the group on top of the stack: the upper part gets 0,
          // the lower part 1; push each part that still has two symbols.
          for (int i = 0; i < int'(N); i++) begin
            if (i >= int'(g_lo) && i < int'(g_hi)) begin
              sf_code[i] <= {sf_code[i][CDW-2:0], (i >= int'(g_k))};
              len[i]     <= len[i] + 1'b1;
            end
          end
          if (g_k - g_lo > 1 && g_hi - g_k > 1) begin
            stk_lo[top] <= g_lo;
            stk_hi[top] <= g_k;
            stk_lo[nxt]             <= g_k;
            stk_hi[nxt]             <= g_hi;
            sp <= sp + 1'b1;
          end else if (g_k - g_lo > 1) begin
            stk_lo[top] <= g_lo;
            stk_hi[top] <= g_k;
          end else if (g_hi - g_k > 1) begin
            stk_lo[top] <= g_k;
            stk_hi[top] <= g_hi;
          end else begin
            sp <= sp - 1'b1;
            if (sp == IW'(1)) begin
              total <= run;
              state <= H_DONE;
              done  <= 1'b1;
            end
          end
        end
        H_LEN: begin
          total <= run;
          for (int i = 0; i < int'(N); i++)
            len[i] <= (i < int'(n_unique)) ? code_length(cnt_s[i], run) : '0;
          // (a single symbol in Shannon-Fano mode also ends here: length 1, code 0)
          state <= H_DONE;
          done  <= 1'b1;
        end
        default: ;
      endcase
    end
  end

endmodule
