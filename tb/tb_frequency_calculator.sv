// tb_frequency_calculator: streams random messages (small alphabets, so that
// symbols repeat) and compares the symbol table, counts, number of distinct
// symbols and the timing of status S with a reference count in the bench.
module tb_frequency_calculator;
  import src_enc_pkg::*;
  localparam int N = MAX_LEN;
  int checks = 0, failures = 0;

  logic clk = 0, rst, clr, in_valid, in_last, s;
  logic [SYM_W-1:0] in_data;
  logic [SYM_W-1:0] sym [N];
  logic [CNT_W-1:0] cnt [N];
  logic [$clog2(N+1)-1:0] n_unique;

  frequency_calculator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [SYM_W-1:0] rsym [N];
    int rcnt [N];
    int rn, L, alpha;
    rst = 1; clr = 0; in_valid = 0; in_last = 0; in_data = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    check(n_unique == 0 && !s, "reset");
    for (int t = 0; t < 300; t++) begin
      L = $urandom_range(1, N);
      alpha = $urandom_range(1, 20);
      rn = 0;
      clr = 1; @(negedge clk); clr = 0;
      for (int i = 0; i < L; i++) begin
        int hit;
        in_valid = 1; in_last = (i == L - 1);
        in_data = SYM_W'(8'h41 + $urandom_range(0, alpha - 1));
        hit = -1;
        for (int j = 0; j < rn; j++) if (rsym[j] == in_data) hit = j;
        if (hit >= 0) rcnt[hit]++;
        else begin rsym[rn] = in_data; rcnt[rn] = 1; rn++; end
        @(negedge clk);
        check(s == (i == L - 1), "status S timing");
      end
      in_valid = 0; in_last = 0;
      check(int'(n_unique) == rn, "distinct count");
      for (int j = 0; j < rn; j++) begin
        check(sym[j] == rsym[j], "symbol table");
        check(int'(cnt[j]) == rcnt[j], "occurrence count");
      end
      for (int j = rn; j < N; j++) check(cnt[j] == 0, "unused entries zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
