// tb_shannon_code_generator: the bench sorts each random message's counts
// itself, forms cumulative counts and code lengths, and hands them to the
// code generator; it answers msg_req by replaying the message as the memory
// element would. The expected code word of symbol i is
// floor(cum[i] * 2^len[i] / T), the first len[i] bits of cum[i]/T. For
// "electronics" the first two code words must be 000 and 001. Checks the
// code table, each streamed code word, the stored compressed data, that the
// data decodes back to the message, and one cycle per code bit.
module tb_shannon_code_generator;
  import src_enc_pkg::*;
  localparam int N   = MAX_LEN;
  localparam int CDW = N - 1;
  localparam int CLW = $clog2(CDW + 1);
  localparam int BW  = N * CDW;
  int checks = 0, failures = 0;

  logic clk = 0, rst, start, done, msg_req, sf_mode;
  logic [CDW-1:0] sf_code [N];
  logic in_valid, in_last;
  logic [SYM_W-1:0] in_data;
  logic [SYM_W-1:0] sym_s [N];
  logic [$clog2(N+1)-1:0] n_unique;
  logic [CNT_W-1:0] cum [N], total;
  logic [CLW-1:0] len_in [N], len [N];
  logic [CDW-1:0] code [N];
  logic out_valid;
  logic [CDW-1:0] out_code;
  logic [CLW-1:0] out_len;
  logic [BW-1:0] comp_bits;
  logic [$clog2(BW+1)-1:0] comp_len;

  shannon_code_generator dut (.*);

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
  int req_cycle, cyc_count;

  always @(posedge clk) cyc_count <= cyc_count + 1;

  // Memory-element model: replay the message starting the cycle after msg_req.
  initial begin
    in_valid = 0; in_last = 0; in_data = '0;
    forever begin
      @(negedge clk);
      if (msg_req) begin
        req_cycle = cyc_count;
        @(negedge clk);
        for (int i = 0; i < L; i++) begin
          in_valid = 1; in_data = msg[i]; in_last = (i == L - 1);
          @(negedge clk);
        end
        in_valid = 0; in_last = 0;
      end
    end
  end


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

  task automatic run();
    int n, cnt [N], exp_code [N], total_i, seen, bits, sumlen, start_cycle;
    logic [BW-1:0] exp_bits;
    n = 0;
    for (int i = 0; i < N; i++) begin sym_s[i] = '0; cnt[i] = 0; cum[i] = '0; len_in[i] = '0; end
    for (int i = 0; i < L; i++) begin
      int hit;
      hit = -1;
      for (int j = 0; j < n; j++) if (sym_s[j] == msg[i]) hit = j;
      if (hit >= 0) cnt[hit]++;
      else begin sym_s[n] = msg[i]; cnt[n] = 1; n++; end
    end
    // Stable insertion sort, descending counts.
    for (int i = 1; i < n; i++) begin
      int j;
      j = i;
      while (j > 0 && cnt[j] > cnt[j-1]) begin
        int tc; logic [SYM_W-1:0] ts;
        tc = cnt[j]; cnt[j] = cnt[j-1]; cnt[j-1] = tc;
        ts = sym_s[j]; sym_s[j] = sym_s[j-1]; sym_s[j-1] = ts;
        j--;
      end
    end
    total_i = 0; sumlen = 0;
    for (int i = 0; i < n; i++) begin
      int l;
      cum[i] = CNT_W'(total_i);
      total_i += cnt[i];
      l = 1;
      while ((cnt[i] << l) < L) l++;
      len_in[i] = CLW'(l);
      sumlen += l;
    end
    for (int i = 0; i < n; i++)
      exp_code[i] = (int'(cum[i]) << int'(len_in[i])) / L;
    for (int i = 0; i < N; i++) sf_code[i] = '0;
    if (sf_mode) begin
      int rc [N], rl [N];
      sf_reference(cnt, n, rc, rl);
      sumlen = 0;
      for (int i = 0; i < n; i++) begin
        len_in[i] = CLW'(rl[i]); sf_code[i] = CDW'(rc[i]); exp_code[i] = rc[i];
      end
    end
    total = CNT_W'(L);
    n_unique = ($clog2(N+1))'(n);
    start_cycle = cyc_count;
    start = 1; @(negedge clk); start = 0;
    seen = 0; bits = 0; exp_bits = '0;
    while (!done) begin
      if (out_valid) begin
        int k;
        k = 0;
        for (int j = 0; j < n; j++) if (sym_s[j] == msg[seen]) k = j;
        check(int'(out_code) == exp_code[k] && out_len == len_in[k], "streamed code word");
        exp_bits = (exp_bits << len_in[k]) | BW'(exp_code[k]);
        bits += int'(len_in[k]);
        seen++;
      end
      @(negedge clk);
    end
    check(req_cycle - start_cycle == sumlen + 1, sf_mode ? "Shannon-Fano codes taken at once" : "one cycle per code bit");
    check(seen == L, "one code word per character");
    for (int i = 0; i < n; i++)
      check(int'(code[i]) == exp_code[i] && len[i] == len_in[i], "code table");
    check(int'(comp_len) == bits && comp_bits == exp_bits, "stored compressed data");
    begin
      int pos, c, ok;
      pos = int'(comp_len); c = 0; ok = 1;
      while (pos > 0 && c < L) begin
        int found;
        found = -1;
        for (int j = 0; j < n; j++)
          if (int'(len[j]) <= pos && int'((comp_bits >> (pos - int'(len[j]))) & ((BW'(1) << len[j]) - 1)) == int'(code[j])) begin
            if (found >= 0) ok = 0;
            found = j;
          end
        if (found < 0 || sym_s[found] != msg[c]) ok = 0;
        if (found < 0) break;
        pos -= int'(len[found]); c++;
      end
      check(ok == 1 && c == L && pos == 0, "decodes back to the message");
    end
  endtask

  initial begin
    string e;
    cyc_count = 0;
    rst = 1; start = 0; n_unique = '0; total = '0; sf_mode = 0;
    for (int i = 0; i < N; i++) sf_code[i] = '0;
    for (int i = 0; i < N; i++) begin sym_s[i] = '0; cum[i] = '0; len_in[i] = '0; end
    repeat (2) @(negedge clk);
    rst = 0;
    e = "electronics";
    L = e.len();
    for (int i = 0; i < L; i++) msg[i] = e[i];
    run();
    check(code[0] == 0 && len[0] == 3, "electronics: codeword 1 = 000");
    check(code[1] == 1 && len[1] == 3, "electronics: codeword 2 = 001");
    check(comp_len == 40, "electronics: 40 bits");
    for (int t = 0; t < 400; t++) begin
      int alpha;
      sf_mode = t[0];
      L = $urandom_range(1, N);
      alpha = $urandom_range(1, 16);
      for (int i = 0; i < L; i++) msg[i] = SYM_W'(8'h61 + $urandom_range(0, alpha - 1));
      run();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
