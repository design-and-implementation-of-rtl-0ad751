// tb_source_encoder_top: end-to-end test of the whole encoder at its default
// sizes. Runs "electronics" with both lanes, then random messages in all
// three lane modes. For every enabled lane it checks that
//   - the code table lists each distinct symbol once, in descending count
//     order, and is prefix free,
//   - Huffman: the compressed size equals the optimum from an independent
//     Huffman reference (35 bits for "electronics"),
//   - Shannon: every code word is floor(cum * 2^len / T) with
//     len = ceil(log2(T / count)) (40 bits for "electronics", first code
//     words 000 and 001, lengths 3 3 4 4 4 4 4 4 4),
//   - the streamed code words match the table, character by character,
//   - the stored compressed data decodes back to the message,
// and that a disabled lane keeps its previous result. With the Shannon lane
// switched to Shannon-Fano the code words must equal a reference splitting
// in the bench. It counts how often
// each mechanism occurred: the three modes, message overflow (more than 15
// characters), the Shannon and Shannon-Fano algorithms, a single-symbol message, a full table of 15 distinct
// symbols, and input back-pressure (a character offered while in_ready is
// low). A mechanism that never occurred counts as a failure.
module tb_source_encoder_top;
  import src_enc_pkg::*;
  localparam int N   = MAX_LEN;
  localparam int CDW = N - 1;
  localparam int CLW = $clog2(CDW + 1);
  localparam int BW  = N * CDW;
  localparam int BLW = $clog2(BW + 1);
  int checks = 0, failures = 0;

  logic clk = 0, rst, start, in_valid, in_last, in_ready, busy, done, sf_mode;
  enc_mode_e mode;
  logic [SYM_W-1:0] in_data;
  logic [1:0] overflow;
  logic [SYM_W-1:0] huf_sym [N], sha_sym [N];
  logic [CDW-1:0] huf_code [N], sha_code [N];
  logic [CLW-1:0] huf_len [N], sha_len [N];
  logic [$clog2(N+1)-1:0] huf_n, sha_n;
  logic huf_out_valid, sha_out_valid;
  logic [CDW-1:0] huf_out_code, sha_out_code;
  logic [CLW-1:0] huf_out_len, sha_out_len;
  logic [BW-1:0] huf_bits, sha_bits;
  logic [BLW-1:0] huf_nbits, sha_nbits;

  source_encoder_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int n_huf_only, n_sha_only, n_both, n_ovf, n_single, n_full, n_backpressure, n_sf, n_shannon;

  // Message of the current run (after truncation to N characters).
  logic [SYM_W-1:0] msg [N];
  int L;

  // Streamed code words, captured per lane.
  logic [CDW-1:0] hs_code [N], ss_code [N];
  logic [CLW-1:0] hs_len [N], ss_len [N];
  int hs_n, ss_n;
  always @(posedge clk) begin
    if (huf_out_valid && hs_n < N) begin hs_code[hs_n] <= huf_out_code; hs_len[hs_n] <= huf_out_len; hs_n <= hs_n + 1; end
    if (sha_out_valid && ss_n < N) begin ss_code[ss_n] <= sha_out_code; ss_len[ss_n] <= sha_out_len; ss_n <= ss_n + 1; end
  end

  function automatic int huffman_cost(input int w [N], input int n);
    int pool [N];
    int m, cost;
    for (int i = 0; i < n; i++) pool[i] = w[i];
    m = n; cost = 0;
    while (m > 1) begin
      int a, b, t;
      a = 0;
      for (int i = 1; i < m; i++) if (pool[i] < pool[a]) a = i;
      t = pool[a]; pool[a] = pool[m-1]; pool[m-1] = t; m--;
      b = 0;
      for (int i = 1; i < m; i++) if (pool[i] < pool[b]) b = i;
      pool[b] = pool[b] + t;
      cost += pool[b];
    end
    return (n == 1) ? w[0] : cost;
  endfunction


  // Reference Shannon-Fano code of sorted counts w[0..n-1]: split each
  // group where the two parts' sums differ least (first such point),
  // upper part 0, lower part 1.
  task automatic sf_reference(input int w [N], input int n, output int rc [N], output int rl [N]);
    int qlo [$], qhi [$];
    for (int i = 0; i < N; i++) begin rc[i] = 0; rl[i] = 0; end
    if (n == 1) begin rl[0] = 1; return; end
    qlo.push_back(0); qhi.push_back(n);
    while (qlo.size() > 0) begin
      int lo, hi, k, best, tot, left;
      lo = qlo.pop_back(); hi = qhi.pop_back();
      tot = 0;
      for (int i = lo; i < hi; i++) tot += w[i];
      best = 1 << 30; k = lo + 1; left = 0;
      for (int j = lo + 1; j < hi; j++) begin
        int dd;
        left += w[j-1];
        dd = (2 * left > tot) ? 2 * left - tot : tot - 2 * left;
        if (dd < best) begin best = dd; k = j; end
      end
      for (int i = lo; i < hi; i++) begin rc[i] = (rc[i] << 1) | int'(i >= k); rl[i]++; end
      if (k - lo > 1) begin qlo.push_back(lo); qhi.push_back(k); end
      if (hi - k > 1) begin qlo.push_back(k); qhi.push_back(hi); end
    end
  endtask

  // Check one lane's table, stream and stored data.
  task automatic check_lane(input bit is_huf,
                            input logic [SYM_W-1:0] tsym [N], input logic [CDW-1:0] tcode [N],
                            input logic [CLW-1:0] tlen [N], input int tn,
                            input logic [CDW-1:0] scode [N], input logic [CLW-1:0] slen [N], input int sn,
                            input logic [BW-1:0] bits, input int nbits);
    logic [SYM_W-1:0] rsym [N];
    int rcnt [N], rn, w [N], idx [N], total;
    string lane;
    lane = is_huf ? "huffman" : "shannon";
    rn = 0;
    for (int i = 0; i < L; i++) begin
      int hit;
      hit = -1;
      for (int j = 0; j < rn; j++) if (rsym[j] == msg[i]) hit = j;
      if (hit >= 0) rcnt[hit]++;
      else begin rsym[rn] = msg[i]; rcnt[rn] = 1; rn++; end
    end
    check(tn == rn, {lane, ": number of distinct symbols"});
    // table: each symbol once, descending counts
    for (int i = 0; i < tn; i++) begin
      int k;
      k = -1;
      for (int j = 0; j < rn; j++) if (rsym[j] == tsym[i]) k = j;
      check(k >= 0, {lane, ": table symbol occurs in message"});
      idx[i] = (k >= 0) ? k : 0;
      w[i] = rcnt[idx[i]];
      if (i > 0) check(w[i-1] >= w[i], {lane, ": descending order"});
      for (int j = 0; j < i; j++) check(tsym[j] != tsym[i], {lane, ": symbol listed once"});
      // prefix freedom
      for (int j = 0; j < tn; j++) if (j != i && tlen[j] <= tlen[i])
        check((tcode[i] >> (tlen[i] - tlen[j])) != tcode[j], {lane, ": prefix free"});
    end
    // code word per character
    total = 0;
    check(sn == L, {lane, ": one code word per character"});
    for (int c = 0; c < L && c < sn; c++) begin
      int k;
      k = 0;
      for (int j = 0; j < tn; j++) if (tsym[j] == msg[c]) k = j;
      check(scode[c] == tcode[k] && slen[c] == tlen[k], {lane, ": streamed code word"});
      total += int'(tlen[k]);
    end
    check(nbits == total, {lane, ": compressed size"});
    if (is_huf) begin
      check(total == huffman_cost(w, tn), "huffman: optimal size");
    end else if (sf_mode) begin
      int rc [N], rl [N];
      sf_reference(w, tn, rc, rl);
      for (int i = 0; i < tn; i++)
        check(int'(tlen[i]) == rl[i] && int'(tcode[i]) == rc[i], "shannon-fano: code word");
    end else begin
      int cum;
      cum = 0;
      for (int i = 0; i < tn; i++) begin
        int l;
        l = 1;
        while ((w[i] << l) < L) l++;
        check(int'(tlen[i]) == l, "shannon: code length");
        check(int'(tcode[i]) == (cum << l) / L, "shannon: code word");
        cum += w[i];
      end
    end
    // decode
    begin
      int pos, c, ok;
      pos = nbits; c = 0; ok = 1;
      while (pos > 0 && c < L) begin
        int found;
        found = -1;
        for (int j = 0; j < tn; j++)
          if (int'(tlen[j]) <= pos && ((bits >> (pos - int'(tlen[j]))) & ((BW'(1) << tlen[j]) - 1)) == BW'(tcode[j]))
            found = j;
        if (found < 0 || tsym[found] != msg[c]) ok = 0;
        if (found < 0) break;
        pos -= int'(tlen[found]); c++;
      end
      check(ok == 1 && c == L && pos == 0, {lane, ": decodes back to the message"});
    end
  endtask

  // Run one message through the encoder; stream has `len_in` characters.
  task automatic encode(input enc_mode_e m, input bit sf, input logic [SYM_W-1:0] stream [], input int len_in);
    int guard, sent;
    bit taken;
    logic [SYM_W-1:0] prev_hsym [N];
    logic [CDW-1:0]   prev_hcode [N];
    logic [BW-1:0]    prev_hbits, prev_sbits;
    prev_hsym = huf_sym; prev_hcode = huf_code; prev_hbits = huf_bits; prev_sbits = sha_bits;
    L = (len_in > N) ? N : len_in;
    for (int i = 0; i < L; i++) msg[i] = stream[i];
    hs_n = 0; ss_n = 0;
    mode = m; start = 1; sf_mode = sf;
    // offer the first character at once: it must wait for in_ready
    in_valid = 1; in_data = stream[0]; in_last = (len_in == 1);
    if (!in_ready) n_backpressure++;
    @(negedge clk); start = 0;
    sent = 0;
    // sf_mode is sampled at start only; keep it as it is for the checks
    guard = 0;
    while (sent < len_in && guard < 1000) begin
      if (in_valid && !in_ready) n_backpressure++;
      in_valid = 1; in_data = stream[sent]; in_last = (sent == len_in - 1);
      taken = in_ready;   // stable until the next clock edge
      @(negedge clk);
      if (taken) sent++;
      guard++;
    end
    in_valid = 0; in_last = 0;
    guard = 0;
    while (!done && guard < 2000) begin @(negedge clk); guard++; end
    check(done, "run completes");
    @(negedge clk);
    check((overflow & m) == ((len_in > N) ? m : 2'b00), "overflow flag");
    if (len_in > N) n_ovf++;
    if (m == MODE_HUFFMAN) n_huf_only++;
    if (m == MODE_SHANNON) n_sha_only++;
    if (m == MODE_BOTH) n_both++;
    if (m[0]) begin
      check_lane(1, huf_sym, huf_code, huf_len, int'(huf_n), hs_code, hs_len, hs_n, huf_bits, int'(huf_nbits));
      if (huf_n == 1) n_single++;
      if (huf_n == N) n_full++;
    end else begin
      check(hs_n == 0 && huf_bits == prev_hbits && huf_sym == prev_hsym && huf_code == prev_hcode,
            "disabled huffman lane untouched");
    end
    if (m[1]) begin
      if (sf) n_sf++; else n_shannon++;
      check_lane(0, sha_sym, sha_code, sha_len, int'(sha_n), ss_code, ss_len, ss_n, sha_bits, int'(sha_nbits));
      if (sha_n == 1) n_single++;
      if (sha_n == N) n_full++;
    end else begin
      check(ss_n == 0 && sha_bits == prev_sbits, "disabled shannon lane untouched");
    end
  endtask

  initial begin
    logic [SYM_W-1:0] s [];
    string e;
    static int fig_len [9] = '{3, 3, 4, 4, 4, 4, 4, 4, 4};
    rst = 1; start = 0; in_valid = 0; in_last = 0; in_data = '0; mode = MODE_NONE; sf_mode = 0;
    repeat (3) @(negedge clk);
    rst = 0;

    // The worked example of the design: "electronics" on both lanes.
    e = "electronics";
    s = new[e.len()];
    for (int i = 0; i < e.len(); i++) s[i] = e[i];
    encode(MODE_BOTH, 0, s, e.len());
    check(huf_nbits == 35, "electronics: Huffman size 35 bits");
    check(sha_nbits == 40, "electronics: Shannon size 40 bits");
    for (int i = 0; i < 9; i++) check(int'(sha_len[i]) == fig_len[i], "electronics: Shannon length");
    check(sha_code[0] == 0 && sha_code[1] == 1, "electronics: Shannon code words 000, 001");
    // This design's Huffman code for the example (labels: lighter child 0).
    check(huf_sym[0] == "e" && huf_code[0] == 14'b110 && huf_len[0] == 3, "electronics: Huffman e = 110");
    check(huf_sym[7] == "i" && huf_code[7] == 14'b1111 && huf_len[7] == 4, "electronics: Huffman i = 1111");

    // A single-symbol message and a 15-symbol message.
    s = new[5];
    for (int i = 0; i < 5; i++) s[i] = "z";
    encode(MODE_BOTH, 0, s, 5);
    s = new[N];
    for (int i = 0; i < N; i++) s[i] = SYM_W'(8'h30 + i);
    encode(MODE_BOTH, 1, s, N);

    // Random messages in rotating modes, some longer than the window.
    // Shannon-Fano on the example: e = 00, 2 + 2*3 + ... bits.
    s = new[e.len()];
    for (int i = 0; i < e.len(); i++) s[i] = e[i];
    encode(MODE_SHANNON, 1, s, e.len());
    check(sha_len[0] == 2 && sha_code[0] == 0, "electronics: Shannon-Fano e = 00");
    check(sha_nbits == 35, "electronics: Shannon-Fano size 35 bits");

    for (int t = 0; t < 150; t++) begin
      int len_in, alpha;
      enc_mode_e m;
      m = enc_mode_e'(1 + (t % 3));
      len_in = $urandom_range(1, N + 4);
      alpha = $urandom_range(1, 20);
      s = new[len_in];
      for (int i = 0; i < len_in; i++) s[i] = SYM_W'(8'h61 + $urandom_range(0, alpha - 1));
      encode(m, t[2], s, len_in);
    end

    $display("mechanisms: huffman_only=%0d shannon_only=%0d both=%0d shannon=%0d shannon_fano=%0d overflow=%0d single=%0d full_table=%0d backpressure=%0d",
             n_huf_only, n_sha_only, n_both, n_shannon, n_sf, n_ovf, n_single, n_full, n_backpressure);
    check(n_sf > 0, "Shannon-Fano algorithm exercised");
    check(n_shannon > 0, "Shannon algorithm exercised");
    check(n_huf_only > 0, "mode huffman exercised");
    check(n_sha_only > 0, "mode shannon exercised");
    check(n_both > 0, "mode both exercised");
    check(n_ovf > 0, "overflow exercised");
    check(n_single > 0, "single symbol exercised");
    check(n_full > 0, "full table exercised");
    check(n_backpressure > 0, "back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
