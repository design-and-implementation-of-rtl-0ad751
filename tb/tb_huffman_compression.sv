// tb_huffman_compression: feeds frequency tables of random messages (and the
// "electronics" example) and checks the tree the module builds: every leaf
// reaches the root, every internal node has exactly two children labelled 0
// and 1, the lighter child carries 0, the weighted path length equals the
// optimum found by an independent Huffman reference in the bench, and done
// arrives N+1 cycles after start plus one cycle per merge.
module tb_huffman_compression;
  import src_enc_pkg::*;
  localparam int N  = MAX_LEN;
  localparam int NN = 2 * N - 1;
  localparam int NW = $clog2(NN);
  int checks = 0, failures = 0;

  logic clk = 0, rst, start, done;
  logic [SYM_W-1:0] sym_in [N], sym_s [N];
  logic [CNT_W-1:0] cnt_in [N], cnt_s [N];
  logic [$clog2(N+1)-1:0] n_in, n_unique;
  logic [NW-1:0] parent [NN];
  logic          edge_bit [NN];
  logic [NW-1:0] root;

  huffman_compression dut (.*);

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

  // Optimal cost: repeatedly merge the two smallest weights.
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
    return cost;
  endfunction

  task automatic run(input logic [SYM_W-1:0] msg [N], input int L);
    int w [N];
    int n, cyc, cost, node, depth, nchild [NN], wsub [NN];
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
    for (int i = 0; i < N; i++) w[i] = int'(cnt_in[i]);
    start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < 200) begin @(negedge clk); cyc++; end
    check(cyc == N + 1 + ((n > 1) ? n - 1 : 0) + 1, "latency");
    check(int'(n_unique) == n, "n_unique");
    // Weighted path length.
    cost = 0;
    for (int i = 0; i < NN; i++) begin nchild[i] = 0; wsub[i] = 0; end
    for (int i = 0; i < n; i++) begin
      node = i; depth = 0;
      wsub[i] = int'(cnt_s[i]);
      while (node != int'(root) && depth < N) begin node = int'(parent[node]); depth++; end
      check(node == int'(root), "leaf reaches root");
      cost += int'(cnt_s[i]) * depth;
    end
    check(cost == huffman_cost(w, n), "optimal weighted path length");
    if (n > 1) begin
      check(int'(root) == N + n - 2, "root is the last internal node");
      // Children per internal node and their labels.
      for (int k = N; k < N + n - 1; k++) begin
        int c0, c1, w0, w1;
        c0 = 0; c1 = 0; w0 = 0; w1 = 0;
        for (int i = 0; i < N + n - 1; i++) begin
          if ((i < n || i >= N) && i != int'(root) && int'(parent[i]) == k) begin
            int wi;
            wi = (i < n) ? int'(cnt_s[i]) : 0;
            if (i >= N) begin
              // weight of an internal node = sum of its leaves
              wi = 0;
              for (int lf = 0; lf < n; lf++) begin
                int nd, d;
                nd = lf; d = 0;
                while (nd != i && nd != int'(root) && d < N) begin nd = int'(parent[nd]); d++; end
                if (nd == i) wi += int'(cnt_s[lf]);
              end
            end
            if (edge_bit[i]) begin c1++; w1 = wi; end else begin c0++; w0 = wi; end
          end
        end
        check(c0 == 1 && c1 == 1, "two children labelled 0 and 1");
        check(w0 <= w1, "lighter child labelled 0");
      end
    end else begin
      check(root == 0, "single symbol: root is the leaf");
    end
  endtask

  initial begin
    logic [SYM_W-1:0] msg [N];
    string e;
    rst = 1; start = 0; n_in = '0;
    for (int i = 0; i < N; i++) begin sym_in[i] = '0; cnt_in[i] = '0; end
    repeat (2) @(negedge clk);
    rst = 0;
    e = "electronics";
    for (int i = 0; i < e.len(); i++) msg[i] = e[i];
    run(msg, e.len());
    for (int t = 0; t < 200; t++) begin
      int L, alpha;
      L = $urandom_range(1, N);
      alpha = $urandom_range(1, 16);
      for (int i = 0; i < L; i++) msg[i] = SYM_W'(8'h61 + $urandom_range(0, alpha - 1));
      run(msg, L);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
