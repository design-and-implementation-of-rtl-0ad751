// tb_shannon_compression: for the "electronics" example checks the code
// lengths 3 3 4 4 4 4 4 4 4 and the cumulative counts 0 2 4 5 ... 10 (the
// cumulative probabilities 0, 0.1818, 0.3636, ... times 11); for random
// messages checks the descending order, cum[i] = sum of the counts before
// i, len[i] = smallest l >= 1 with cnt[i] * 2^l >= T (computed in the bench
// with real arithmetic as ceil(log2(T / cnt))), the total T and the latency.
// In Shannon-Fano mode the code words and lengths are compared with a
// reference splitting in the bench.
module tb_shannon_compression;
  import src_enc_pkg::*;
  localparam int N   = MAX_LEN;
  localparam int CDW = N - 1;
  localparam int CLW = $clog2(CDW + 1);
  int checks = 0, failures = 0;

  logic clk = 0, rst, start, done, sf_mode;
  logic [CDW-1:0] sf_code [N];
  logic [SYM_W-1:0] sym_in [N], sym_s [N];
  logic [CNT_W-1:0] cnt_in [N], cnt_s [N], cum [N], total;
  logic [CLW-1:0] len [N];
  logic [$clog2(N+1)-1:0] n_in, n_unique;

  shannon_compression dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask


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

  task automatic run(input logic [SYM_W-1:0] msg [N], input int L, output int n);
    int cyc, c;
    n = 0;
    for (int i = 0; i < N; i++) begin sym_in[i] = '0; cnt_in[i] = '0; end
    for (int i = 0; i < L; i++) begin
      int hit;
      hit = -1;
      for (int j = 0; j < n; j++) if (sym_in[j] == msg[i]) hit = j;
      if (hit >= 0) cnt_in[hit]++;
      else begin sym_in[n] = msg[i]; cnt_in[n] = 1; n++; end
    end
    n_in = ($clog2(N+1))'(n);
    start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < 200) begin @(negedge clk); cyc++; end
    if (sf_mode && n > 1) check(cyc == N + 1 + n + 1 + (n - 1), "latency, Shannon-Fano");
    else check(cyc == N + 1 + n + 2, "latency");
    check(int'(total) == L, "total count");
    if (sf_mode) begin
      int w [N], rc [N], rl [N];
      for (int i = 0; i < N; i++) w[i] = int'(cnt_s[i]);
      sf_reference(w, n, rc, rl);
      for (int i = 0; i < n; i++) begin
        check(int'(len[i]) == rl[i] && int'(sf_code[i]) == rc[i], "Shannon-Fano code word");
        if (i > 0) check(cnt_s[i-1] >= cnt_s[i], "descending");
      end
      return;
    end
    c = 0;
    for (int i = 0; i < n; i++) begin
      real lr;
      int le;
      lr = $ln(real'(L) / real'(cnt_s[i])) / $ln(2.0);
      le = int'($ceil(lr - 1e-9));
      if (le < 1) le = 1;
      if (i > 0) check(cnt_s[i-1] >= cnt_s[i], "descending");
      check(int'(cum[i]) == c, "cumulative count");
      check(int'(len[i]) == le, "code length");
      c += int'(cnt_s[i]);
    end
  endtask

  initial begin
    logic [SYM_W-1:0] msg [N];
    string e;
    int n;
    static int fig_len [9] = '{3, 3, 4, 4, 4, 4, 4, 4, 4};
    static int fig_cum [9] = '{0, 2, 4, 5, 6, 7, 8, 9, 10};
    rst = 1; start = 0; n_in = '0; sf_mode = 0;
    for (int i = 0; i < N; i++) begin sym_in[i] = '0; cnt_in[i] = '0; end
    repeat (2) @(negedge clk);
    rst = 0;
    e = "electronics";
    for (int i = 0; i < e.len(); i++) msg[i] = e[i];
    run(msg, e.len(), n);
    check(n == 9 && sym_s[0] == "e" && sym_s[1] == "c", "electronics: sorted symbols");
    for (int i = 0; i < 9; i++) begin
      check(int'(len[i]) == fig_len[i], "electronics: code length");
      check(int'(cum[i]) == fig_cum[i], "electronics: cumulative count");
    end
    // Shannon-Fano on the same example: first split {e,c,l} / {t,r,o,n,i,s},
    // then {e} / {c,l}, so e = 00 and c = 010.
    sf_mode = 1;
    run(msg, e.len(), n);
    check(int'(len[0]) == 2 && int'(len[1]) == 3 && sf_code[0] == 0, "electronics: Shannon-Fano e = 00");
    sf_mode = 0;
    for (int t = 0; t < 400; t++) begin
      int L, alpha;
      sf_mode = t[0];
      L = $urandom_range(1, N);
      alpha = $urandom_range(1, 16);
      for (int i = 0; i < L; i++) msg[i] = SYM_W'(8'h61 + $urandom_range(0, alpha - 1));
      run(msg, L, n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
