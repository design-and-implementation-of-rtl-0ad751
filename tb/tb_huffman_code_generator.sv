// tb_huffman_code_generator: the bench builds its own Huffman tree for each
// random message (same node numbering: leaves 0..N-1, internal nodes from
// N), hands it to the code generator and answers msg_req by replaying the
// message as the memory element would. Checks every code word and length
// against the bench's own root-to-leaf path, each streamed code word, the
// stored compressed data and its length, and that the compressed data
// decodes back to the message.
module tb_huffman_code_generator;
  import src_enc_pkg::*;
  localparam int N   = MAX_LEN;
  localparam int NN  = 2 * N - 1;
  localparam int NW  = $clog2(NN);
  localparam int CDW = N - 1;
  localparam int CLW = $clog2(CDW + 1);
  localparam int BW  = N * CDW;
  int checks = 0, failures = 0;

  logic clk = 0, rst, start, done, msg_req;
  logic in_valid, in_last;
  logic [SYM_W-1:0] in_data;
  logic [SYM_W-1:0] sym_s [N];
  logic [$clog2(N+1)-1:0] n_unique;
  logic [NW-1:0] parent [NN];
  logic          edge_bit [NN];
  logic [NW-1:0] root;
  logic [CDW-1:0] code [N];
  logic [CLW-1:0] len [N];
  logic out_valid;
  logic [CDW-1:0] out_code;
  logic [CLW-1:0] out_len;
  logic [BW-1:0] comp_bits;
  logic [$clog2(BW+1)-1:0] comp_len;

  huffman_code_generator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [SYM_W-1:0] msg [N];
  int L;
  bit replay_go = 0;

  // Memory-element model: replay the message one cycle after msg_req.
  initial begin
    in_valid = 0; in_last = 0; in_data = '0;
    forever begin
      @(negedge clk);
      if (msg_req) begin
        @(negedge clk);
        for (int i = 0; i < L; i++) begin
          in_valid = 1; in_data = msg[i]; in_last = (i == L - 1);
          @(negedge clk);
        end
        in_valid = 0; in_last = 0;
      end
    end
  end

  task automatic run();
    int n, w [NN], act [NN], nxt;
    int exp_code [N], exp_len [N], idx [N];
    int total, seen;
    logic [BW-1:0] exp_bits;
    n = 0;
    for (int i = 0; i < N; i++) sym_s[i] = '0;
    for (int i = 0; i < NN; i++) begin w[i] = 0; act[i] = 0; parent[i] = '0; edge_bit[i] = 0; end
    for (int i = 0; i < L; i++) begin
      int hit;
      hit = -1;
      for (int j = 0; j < n; j++) if (sym_s[j] == msg[i]) hit = j;
      if (hit >= 0) w[hit]++;
      else begin sym_s[n] = msg[i]; w[n] = 1; act[n] = 1; idx[n] = n; n++; end
    end
    // Build a tree: merge the two lightest active nodes.
    nxt = N;
    for (int m = 0; m < n - 1; m++) begin
      int a, b;
      a = -1; b = -1;
      for (int i = 0; i < NN; i++) if (act[i] != 0 && (a < 0 || w[i] < w[a])) a = i;
      act[a] = 0;
      for (int i = 0; i < NN; i++) if (act[i] != 0 && (b < 0 || w[i] < w[b])) b = i;
      act[b] = 0;
      parent[a] = NW'(nxt); edge_bit[a] = 0;
      parent[b] = NW'(nxt); edge_bit[b] = 1;
      w[nxt] = w[a] + w[b]; act[nxt] = 1; nxt++;
    end
    root = (n > 1) ? NW'(nxt - 1) : '0;
    n_unique = ($clog2(N+1))'(n);
    // Expected code words: bits read from the root down.
    for (int i = 0; i < n; i++) begin
      int nd, d, c;
      nd = i; d = 0; c = 0;
      while (nd != int'(root)) begin
        c = c | (int'(edge_bit[nd]) << d);
        nd = int'(parent[nd]); d++;
      end
      exp_code[i] = c; exp_len[i] = (d == 0) ? 1 : d;
    end
    start = 1; @(negedge clk); start = 0;
    // Watch the code stream while waiting for done.
    seen = 0; total = 0; exp_bits = '0;
    while (!done) begin
      if (out_valid) begin
        int k;
        k = 0;
        for (int j = 0; j < n; j++) if (sym_s[j] == msg[seen]) k = j;
        check(int'(out_code) == exp_code[k] && int'(out_len) == exp_len[k], "streamed code word");
        exp_bits = (exp_bits << exp_len[k]) | BW'(exp_code[k]);
        total += exp_len[k];
        seen++;
      end
      @(negedge clk);
    end
    check(seen == L, "one code word per character");
    for (int i = 0; i < n; i++)
      check(int'(code[i]) == exp_code[i] && int'(len[i]) == exp_len[i], "code table");
    check(int'(comp_len) == total && comp_bits == exp_bits, "stored compressed data");
    // Decode the stored bits with the generated table.
    begin
      int pos, cnt, ok;
      pos = int'(comp_len); cnt = 0; ok = 1;
      while (pos > 0 && cnt < L) begin
        int found;
        found = -1;
        for (int j = 0; j < n; j++)
          if (int'(len[j]) <= pos && int'((comp_bits >> (pos - int'(len[j]))) & ((BW'(1) << len[j]) - 1)) == int'(code[j])) begin
            if (found >= 0) ok = 0;   // two matches: not prefix free
            found = j;
          end
        if (found < 0 || sym_s[found] != msg[cnt]) ok = 0;
        if (found < 0) break;
        pos -= int'(len[found]); cnt++;
      end
      check(ok == 1 && cnt == L && pos == 0, "decodes back to the message");
    end
  endtask

  initial begin
    string e;
    rst = 1; start = 0; n_unique = '0; root = '0;
    for (int i = 0; i < N; i++) sym_s[i] = '0;
    for (int i = 0; i < NN; i++) begin parent[i] = '0; edge_bit[i] = 0; end
    repeat (2) @(negedge clk);
    rst = 0;
    e = "electronics";
    L = e.len();
    for (int i = 0; i < L; i++) msg[i] = e[i];
    run();
    for (int t = 0; t < 200; t++) begin
      int alpha;
      L = $urandom_range(1, N);
      alpha = $urandom_range(1, 16);
      for (int i = 0; i < L; i++) msg[i] = SYM_W'(8'h61 + $urandom_range(0, alpha - 1));
      run();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
